// eg_assembler: concatenates the prefix (M zeros and a one) and the M-bit
// INFO suffix of an Exp-Golomb codeword and shifts it out MSB first, one
// bit per clock (bit_valid, bit_out, bit_last on the final bit). A raw
// single-bit codeword (te with range one) is sent as one bit. A new codeword
// is accepted (in_valid/in_ready) only when the previous one is out; the
// output has no back-pressure.
// The document gives the prefix/INFO split; the serial output and its
// handshake are this design's choice.
module eg_assembler
  import eg_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [4:0]     m,
  input  logic [CNW-1:0] info,
  input  logic           raw,
  input  logic           raw_bit,
  output logic           bit_valid,
  output logic           bit_out,
  output logic           bit_last
);
  typedef enum logic [1:0] {A_IDLE, A_PREFIX, A_SUFFIX, A_RAW} st_t;
  st_t            st;
  logic [4:0]     m_q, cnt;
  logic [CNW-1:0] info_q;
  logic           rbit_q;

  assign in_ready = (st == A_IDLE);

  always_comb begin
    bit_valid = (st != A_IDLE);
    bit_out   = 1'b0;
    bit_last  = 1'b0;
    unique case (st)
      A_PREFIX: begin
        bit_out  = (cnt == m_q);            // M zeros, then the one
        bit_last = (cnt == m_q) && (m_q == 0);
      end
      A_SUFFIX: begin
        bit_out  = info_q[cnt];
        bit_last = (cnt == 0);
      end
      A_RAW: begin
        bit_out  = rbit_q;
        bit_last = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st     <= A_IDLE;
      m_q    <= '0;
      cnt    <= '0;
      info_q <= '0;
      rbit_q <= 1'b0;
    end else begin
      unique case (st)
        A_IDLE: if (in_valid) begin
          m_q    <= m;
          info_q <= info;
          rbit_q <= raw_bit;
          cnt    <= '0;
          st     <= raw ? A_RAW : A_PREFIX;
        end
        A_PREFIX: begin
          if (cnt == m_q) begin
            cnt <= m_q - 1'b1;
            st  <= (m_q == 0) ? A_IDLE : A_SUFFIX;
          end else cnt <= cnt + 1'b1;
        end
        A_SUFFIX: begin
          if (cnt == 0) st <= A_IDLE;
          else          cnt <= cnt - 1'b1;
        end
        A_RAW:   st <= A_IDLE;
        default: st <= A_IDLE;
      endcase
    end
  end
endmodule
