// intra_pe_controller: the PE Controller of the intra predictor. It takes
// the neighbouring samples serially (sample_valid/sample_ready), keeps them
// in registers, and then drives one prediction iteration per clock into
// the four PEs (en, ctl[k]): every iteration yields one row of four
// predictors, or accumulates partial sums in the PEs' D registers.
//
// 4x4 block (blk = BLK4): samples M, A..H, I..L (13). Then modes 0..8 in
// order, four iterations each (row 0..3). Modes 0/1 use the bypass line;
// mode 2 (DC) first adds A..D in PE1 and I..L in PE2 (accumulate), takes
// the two sums back from the D registers (din) and then forms
// (sumT + sumL + 4) >> 3 in every PE for each row; modes 3..8 put the
// three (or two) taps of each pixel's directional filter on the adders as
// (W, X, X, Y) with round 2, shift 2, or (X, Y, 0, 0) with round 1, shift 1.
// 16x16 block (blk = BLK16): samples T0..T15, then M, L0..L15. Mode 0
// runs as soon as the top row is in, together with the first DC iteration
// (PE k adds T[k], T[k+4], T[k+8], T[k+12]); after the left column, mode 1,
// the remaining DC iterations (PE k adds L[k], L[k+4], L[k+8], then
// L[k+12], then PE0 adds the four partial sums), DC output with round 16,
// shift 5, and the plane mode: b, c and four seed values
// a + b(4g-7) - 7c + 16 (g = 0..3, columns 0, 4, 8, 12) are computed, and
// for each 4-column group g PE k starts at seed_g + k*b on row 0 and adds c
// on every following row through its D register; shift 5 then gives the
// predictor. 16x16 modes emit 64 iterations in group-major order
// (iteration = 16*g + row).
// meta_* describe the iteration on en (mode, block size, row, first
// column); block_done pulses after the last iteration of a block.
// The sample order, the mode order and the accumulation scheme follow the
// document; computing the plane seeds here, and broadcasting the DC value
// over the whole block, are this design's choices.
module intra_pe_controller
  import intra_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  blk_t       blk,
  input  logic       sample_valid,
  output logic       sample_ready,
  input  logic [7:0] sample,
  input  opnd_t      din [NUM_PE],
  output logic       en,
  output pe_ctl_t    ctl [NUM_PE],
  output logic [3:0] meta_mode,
  output blk_t       meta_blk,
  output logic [3:0] meta_row,
  output logic [3:0] meta_col,
  output logic       block_done
);
  typedef enum logic [3:0] {
    S_IDLE, S_RX4, S_RUN4, S_RX16T, S_V16, S_DC1, S_RX16L, S_H16,
    S_DC2, S_DC3, S_DC4, S_DCCAP, S_DCOUT, S_PLSEED, S_PLANE
  } state_t;

  state_t     state;
  blk_t       blk_q;
  logic [7:0] top  [16];
  logic [7:0] left [16];
  logic [7:0] m;
  logic [4:0] cnt;
  logic [3:0] mode4;
  logic [5:0] it;
  opnd_t      sum_a, sum_b;
  opnd_t      pl_b, pl_c;
  opnd_t      pl_seed [4];

  // ---------------------------------------------------------------- helpers
  function automatic opnd_t z8(input logic [7:0] v);
    return opnd_t'({1'b0, v});
  endfunction

  // neighbour sample of a 4x4 block: p[xx, yy], xx, yy in -1..7
  function automatic logic [7:0] p4(input int xx, input int yy);
    if (yy < 0) return (xx < 0) ? m : top[xx[3:0]];
    return left[yy[3:0]];
  endfunction

  function automatic pe_ctl_t tap3(input logic [7:0] w, input logic [7:0] x, input logic [7:0] y);
    pe_ctl_t c;
    c = '0;
    c.op0 = z8(w); c.op1 = z8(x); c.op2 = z8(x); c.op3 = z8(y);
    c.round = 5'd2; c.shift = 3'd2;
    return c;
  endfunction

  function automatic pe_ctl_t tap2(input logic [7:0] x, input logic [7:0] y);
    pe_ctl_t c;
    c = '0;
    c.op0 = z8(x); c.op1 = z8(y);
    c.round = 5'd1; c.shift = 3'd1;
    return c;
  endfunction

  function automatic pe_ctl_t bypass(input logic [7:0] v);
    pe_ctl_t c;
    c = '0;
    c.byp = 1'b1; c.bval = v;
    return c;
  endfunction

  // directional 4x4 modes 3..8 for pixel (x, y)
  function automatic pe_ctl_t dir4(input int mode, input int x, input int y);
    pe_ctl_t c;
    int z;
    c = '0;
    case (mode)
      3: if (x == 3 && y == 3) begin
           c = tap3(p4(6, -1), p4(7, -1), p4(7, -1));
           c.op0 = z8(p4(6, -1)); c.op1 = z8(p4(7, -1)); c.op2 = z8(p4(7, -1)); c.op3 = z8(p4(7, -1));
         end else c = tap3(p4(x + y, -1), p4(x + y + 1, -1), p4(x + y + 2, -1));
      4: if (x > y)      c = tap3(p4(x - y - 2, -1), p4(x - y - 1, -1), p4(x - y, -1));
         else if (x < y) c = tap3(p4(-1, y - x - 2), p4(-1, y - x - 1), p4(-1, y - x));
         else            c = tap3(p4(0, -1), p4(-1, -1), p4(-1, 0));
      5: begin
        z = 2 * x - y;
        if (z >= 0 && z % 2 == 0) c = tap2(p4(x - (y >> 1) - 1, -1), p4(x - (y >> 1), -1));
        else if (z >= 0)          c = tap3(p4(x - (y >> 1) - 2, -1), p4(x - (y >> 1) - 1, -1), p4(x - (y >> 1), -1));
        else if (z == -1)         c = tap3(p4(-1, 0), p4(-1, -1), p4(0, -1));
        else                      c = tap3(p4(-1, y - 1), p4(-1, y - 2), p4(-1, y - 3));
      end
      6: begin
        z = 2 * y - x;
        if (z >= 0 && z % 2 == 0) c = tap2(p4(-1, y - (x >> 1) - 1), p4(-1, y - (x >> 1)));
        else if (z >= 0)          c = tap3(p4(-1, y - (x >> 1) - 2), p4(-1, y - (x >> 1) - 1), p4(-1, y - (x >> 1)));
        else if (z == -1)         c = tap3(p4(-1, 0), p4(-1, -1), p4(0, -1));
        else                      c = tap3(p4(x - 1, -1), p4(x - 2, -1), p4(x - 3, -1));
      end
      7: if (y % 2 == 0) c = tap2(p4(x + (y >> 1), -1), p4(x + (y >> 1) + 1, -1));
         else            c = tap3(p4(x + (y >> 1), -1), p4(x + (y >> 1) + 1, -1), p4(x + (y >> 1) + 2, -1));
      default: begin // 8: horizontal up
        z = x + 2 * y;
        if (z < 5 && z % 2 == 0) c = tap2(p4(-1, y + (x >> 1)), p4(-1, y + (x >> 1) + 1));
        else if (z < 5)          c = tap3(p4(-1, y + (x >> 1)), p4(-1, y + (x >> 1) + 1), p4(-1, y + (x >> 1) + 2));
        else if (z == 5) begin
          c = tap3(p4(-1, 2), p4(-1, 3), p4(-1, 3));
          c.op3 = z8(p4(-1, 3));
        end else c = bypass(p4(-1, 3));
      end
    endcase
    return c;
  endfunction

  // ------------------------------------------------------ plane parameters
  opnd_t pl_b_n, pl_c_n;
  opnd_t pl_seed_n [4];
  logic signed [31:0] pl_hs, pl_vs, pl_as, pl_bs, pl_cs;
  always_comb begin
    pl_hs = '0;
    pl_vs = '0;
    for (int i = 0; i < 8; i++) begin
      pl_hs += (i + 1) * (int'(top[8 + i])  - ((i == 7) ? int'(m) : int'(top[6 - i])));
      pl_vs += (i + 1) * (int'(left[8 + i]) - ((i == 7) ? int'(m) : int'(left[6 - i])));
    end
    pl_as = 16 * (int'(left[15]) + int'(top[15]));
    pl_bs = (5 * pl_hs + 32) >>> 6;
    pl_cs = (5 * pl_vs + 32) >>> 6;
  end
  assign pl_b_n = opnd_t'(pl_bs);
  assign pl_c_n = opnd_t'(pl_cs);
  for (genvar g = 0; g < 4; g++) begin : g_seed
    assign pl_seed_n[g] = opnd_t'(pl_as + pl_bs * (4 * g - 7) - 7 * pl_cs + 16);
  end

  // --------------------------------------------------- iteration controls
  logic [1:0] grp;
  logic [3:0] row16;
  assign grp   = it[5:4];
  assign row16 = it[3:0];

  always_comb begin
    en        = 1'b0;
    meta_mode = '0;
    meta_blk  = blk_q;
    meta_row  = '0;
    meta_col  = '0;
    for (int k = 0; k < NUM_PE; k++) ctl[k] = '0;
    unique case (state)
      S_RUN4: begin
        meta_mode = mode4;
        meta_row  = it[3:0];
        en        = !(mode4 == 4'd2 && it == 6'd1);      // capture cycle of DC
        if (mode4 == 4'd2) meta_row = 4'(it - 6'd2);
        for (int k = 0; k < NUM_PE; k++) begin
          unique case (mode4)
            4'd0: ctl[k] = bypass(top[k]);
            4'd1: ctl[k] = bypass(left[{2'b00, it[1:0]}]);
            4'd2: begin
              if (it == 6'd0) begin
                ctl[k].acc = 1'b1;
                if (k == 1) begin
                  ctl[k].op0 = z8(top[0]);  ctl[k].op1 = z8(top[1]);
                  ctl[k].op2 = z8(top[2]);  ctl[k].op3 = z8(top[3]);
                end else if (k == 2) begin
                  ctl[k].op0 = z8(left[0]); ctl[k].op1 = z8(left[1]);
                  ctl[k].op2 = z8(left[2]); ctl[k].op3 = z8(left[3]);
                end
              end else begin
                ctl[k].op0 = sum_a; ctl[k].op1 = sum_b;
                ctl[k].round = 5'd4; ctl[k].shift = 3'd3;
              end
            end
            default: ctl[k] = dir4(int'(mode4), k, int'(it[1:0]));
          endcase
        end
      end
      S_V16, S_H16, S_DCOUT, S_PLANE: begin
        en        = 1'b1;
        meta_row  = row16;
        meta_col  = {grp, 2'b00};
        meta_mode = (state == S_V16) ? 4'd0 : (state == S_H16) ? 4'd1 :
                    (state == S_DCOUT) ? 4'd2 : 4'd3;
        for (int k = 0; k < NUM_PE; k++) begin
          if (state == S_V16)       ctl[k] = bypass(top[{grp, 2'(k)}]);
          else if (state == S_H16)  ctl[k] = bypass(left[row16]);
          else if (state == S_DCOUT) begin
            ctl[k].op0 = sum_a; ctl[k].round = 5'd16; ctl[k].shift = 3'd5;
          end else begin
            ctl[k].shift = 3'd5;
            if (row16 == 4'd0) begin
              ctl[k].op0 = pl_seed[grp];
              ctl[k].op1 = pl_b * opnd_t'(k);
            end else begin
              ctl[k].op0 = din[k];
              ctl[k].op1 = pl_c;
            end
          end
        end
      end
      S_DC1, S_DC2, S_DC3, S_DC4: begin
        en        = 1'b1;
        meta_mode = 4'd2;
        for (int k = 0; k < NUM_PE; k++) begin
          ctl[k].acc = 1'b1;
          unique case (state)
            S_DC1: begin
              ctl[k].op0 = z8(top[k]);     ctl[k].op1 = z8(top[k + 4]);
              ctl[k].op2 = z8(top[k + 8]); ctl[k].op3 = z8(top[k + 12]);
            end
            S_DC2: begin
              ctl[k].op0 = din[k];          ctl[k].op1 = z8(left[k]);
              ctl[k].op2 = z8(left[k + 4]); ctl[k].op3 = z8(left[k + 8]);
            end
            S_DC3: begin
              ctl[k].op0 = din[k];          ctl[k].op1 = z8(left[k + 12]);
            end
            default: if (k == 0) begin
              ctl[k].op0 = din[0]; ctl[k].op1 = din[1];
              ctl[k].op2 = din[2]; ctl[k].op3 = din[3];
            end
          endcase
        end
      end
      default: ;
    endcase
  end

  assign sample_ready = (state == S_IDLE) || (state == S_RX4) ||
                        (state == S_RX16T) || (state == S_RX16L);

  // ------------------------------------------------------------ sequencing
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      blk_q      <= BLK4;
      cnt        <= '0;
      mode4      <= '0;
      it         <= '0;
      m          <= '0;
      sum_a      <= '0;
      sum_b      <= '0;
      pl_b       <= '0;
      pl_c       <= '0;
      block_done <= 1'b0;
      for (int i = 0; i < 16; i++) begin
        top[i]  <= '0;
        left[i] <= '0;
      end
      for (int g = 0; g < 4; g++) pl_seed[g] <= '0;
    end else begin
      block_done <= 1'b0;
      unique case (state)
        S_IDLE: if (sample_valid) begin
          blk_q <= blk;
          if (blk == BLK4) begin
            m     <= sample;
            cnt   <= 5'd1;
            state <= S_RX4;
          end else begin
            top[0] <= sample;
            cnt    <= 5'd1;
            state  <= S_RX16T;
          end
        end
        S_RX4: if (sample_valid) begin
          if (cnt <= 5'd8) top[cnt[3:0] - 4'd1] <= sample;
          else             left[4'(cnt - 5'd9)] <= sample;
          cnt <= cnt + 1'b1;
          if (cnt == 5'd12) begin
            state <= S_RUN4;
            mode4 <= '0;
            it    <= '0;
          end
        end
        S_RUN4: begin
          if (mode4 == 4'd2 && it == 6'd1) begin
            sum_a <= din[1];
            sum_b <= din[2];
          end
          if ((mode4 == 4'd2 && it == 6'd5) || (mode4 != 4'd2 && it == 6'd3)) begin
            it <= '0;
            if (mode4 == 4'd8) begin
              state      <= S_IDLE;
              block_done <= 1'b1;
            end else mode4 <= mode4 + 1'b1;
          end else it <= it + 1'b1;
        end
        S_RX16T: if (sample_valid) begin
          top[cnt[3:0]] <= sample;
          cnt <= cnt + 1'b1;
          if (cnt == 5'd15) begin
            state <= S_V16;
            it    <= '0;
          end
        end
        S_V16: begin
          it <= it + 1'b1;
          if (it == 6'd63) state <= S_DC1;
        end
        S_DC1: begin
          state <= S_RX16L;
          cnt   <= '0;
        end
        S_RX16L: if (sample_valid) begin
          if (cnt == 5'd0) m <= sample;
          else             left[4'(cnt - 5'd1)] <= sample;
          cnt <= cnt + 1'b1;
          if (cnt == 5'd16) begin
            state <= S_H16;
            it    <= '0;
          end
        end
        S_H16: begin
          it <= it + 1'b1;
          if (it == 6'd63) state <= S_DC2;
        end
        S_DC2:   state <= S_DC3;
        S_DC3:   state <= S_DC4;
        S_DC4:   state <= S_DCCAP;
        S_DCCAP: begin
          sum_a <= din[0];
          it    <= '0;
          state <= S_DCOUT;
        end
        S_DCOUT: begin
          it <= it + 1'b1;
          if (it == 6'd63) state <= S_PLSEED;
        end
        S_PLSEED: begin
          pl_b <= pl_b_n;
          pl_c <= pl_c_n;
          for (int g = 0; g < 4; g++) pl_seed[g] <= pl_seed_n[g];
          it    <= '0;
          state <= S_PLANE;
        end
        S_PLANE: begin
          it <= it + 1'b1;
          if (it == 6'd63) begin
            state      <= S_IDLE;
            block_done <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
