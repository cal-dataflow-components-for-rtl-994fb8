// cavlc_assembler: collects the codes of one block from the encoders and
// sends them out as one serial bitstream, in CAVLC order: coeff_token, the
// trailing-one signs, the levels, total_zeros (when 0 < TotalCoeffs < 16)
// and run_before for every coefficient but the last while zeros are left.
// Each code takes one load clock and then one clock per bit (bit_valid,
// bit_out, MSB first); blk_last marks the block's final bit, and blk_take
// (same clock) releases the block from the zigzag scanner. lvl_init/
// lvl_next step the level encoder, sign_idx/run_idx select which sign or
// run code the encoders present, zl_idx the coefficient whose zerosLeft
// (zeros_left_sel) decides whether another run_before follows.
// The document names an assembler that joins the codes; the order is the
// H.264 residual syntax, and the one-load-clock-per-code sequencing is
// this design's choice.
module cavlc_assembler
  import cavlc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       blk_valid,
  output logic       blk_take,
  input  logic [4:0] total_coeffs,
  input  logic [1:0] n_t1,
  input  logic [4:0] n_lev,
  input  logic [4:0] zeros_left_sel,
  input  code_t      ct_code,
  input  code_t      sign_code,
  input  code_t      lvl_code,
  input  code_t      tz_code,
  input  code_t      run_code,
  output logic [1:0] sign_idx,
  output logic [3:0] lvl_idx,
  output logic [3:0] run_idx,
  output logic [3:0] zl_idx,
  output logic       lvl_init,
  output logic       lvl_next,
  output logic       bit_valid,
  output logic       bit_out,
  output logic       blk_last
);
  typedef enum logic [2:0] {E_IDLE, E_CT, E_SIGN, E_LEV, E_TZ, E_RUN} elem_t;
  elem_t       e, ne;
  logic [3:0]  idx, nidx;
  logic        loaded;
  logic [31:0] sh;
  logic [5:0]  cnt;
  code_t       sel;

  assign sign_idx = idx[1:0];
  assign lvl_idx  = idx;
  assign run_idx  = idx;

  always_comb begin
    unique case (e)
      E_CT:    sel = ct_code;
      E_SIGN:  sel = sign_code;
      E_LEV:   sel = lvl_code;
      E_TZ:    sel = tz_code;
      default: sel = run_code;
    endcase
  end

  // next element after (e, idx); zeros_left_sel is zerosLeft at run_idx+1
  always_comb begin
    ne   = E_IDLE;
    nidx = '0;
    unique case (e)
      E_CT: begin
        if (n_t1 != 0)                                  ne = E_SIGN;
        else if (n_lev != 0)                            ne = E_LEV;
        else if (total_coeffs != 0 && total_coeffs < 16) ne = E_TZ;
      end
      E_SIGN: begin
        if (5'(idx) + 5'd1 < 5'(n_t1))                  begin ne = E_SIGN; nidx = idx + 1'b1; end
        else if (n_lev != 0)                            ne = E_LEV;
        else if (total_coeffs < 16)                     ne = E_TZ;
      end
      E_LEV: begin
        if (5'(idx) + 5'd1 < n_lev)                     begin ne = E_LEV; nidx = idx + 1'b1; end
        else if (total_coeffs < 16)                     ne = E_TZ;
      end
      default: ;
    endcase
  end

  logic run_more;   // a run_before follows the current one (or total_zeros)
  logic [3:0] run_next_idx;
  assign run_next_idx = (e == E_TZ) ? 4'd0 : idx + 1'b1;
  assign zl_idx   = run_next_idx;
  assign run_more = (5'(run_next_idx) + 5'd1 < total_coeffs) && (zeros_left_sel != 0);

  logic last_bit;
  assign last_bit  = loaded && (cnt == 6'd1);
  assign bit_valid = loaded;
  assign bit_out   = loaded ? sh[5'(cnt - 6'd1)] : 1'b0;   // cnt is 1..32 while loaded
  always_comb begin
    blk_last = 1'b0;
    if (last_bit) begin
      if (e == E_TZ || e == E_RUN) blk_last = !run_more;
      else                         blk_last = (ne == E_IDLE);
    end
  end
  assign blk_take = blk_last;
  assign lvl_init = (e == E_IDLE) && blk_valid;
  assign lvl_next = last_bit && (e == E_LEV);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e      <= E_IDLE;
      idx    <= '0;
      loaded <= 1'b0;
      sh     <= '0;
      cnt    <= '0;
    end else begin
      if (e == E_IDLE) begin
        if (blk_valid) begin
          e      <= E_CT;
          idx    <= '0;
          loaded <= 1'b0;
        end
      end else if (!loaded) begin
        sh     <= sel.bits;
        cnt    <= sel.len;
        loaded <= 1'b1;
      end else begin
        cnt <= cnt - 1'b1;
        if (last_bit) begin
          loaded <= 1'b0;
          if (e == E_TZ || e == E_RUN) begin
            if (run_more) begin
              e   <= E_RUN;
              idx <= run_next_idx;
            end else e <= E_IDLE;
          end else begin
            e   <= ne;
            idx <= nidx;
          end
        end
      end
    end
  end
endmodule
