// cavlc_zigzag_scanner: collects the 16 coefficients of a 4x4 block, which
// arrive one per clock in raster order (coef_valid/coef_ready), and offers
// the block in zigzag scan order (blk_valid, zz[0] = DC ... zz[15]) until
// the encoder takes it (blk_take). The first coefficient of a block also
// latches the side information nu/nl/avail (neighbour counts for nC).
// Single buffer: coef_ready is low while a complete block waits.
// The document places the scanner first in the network; the scan order is
// the standard's, the single-block buffer this design's choice.
module cavlc_zigzag_scanner
  import cavlc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       coef_valid,
  output logic       coef_ready,
  input  coef_t      coef,
  input  logic [4:0] nu_in,
  input  logic [4:0] nl_in,
  input  logic [1:0] avail_in,
  output logic       blk_valid,
  input  logic       blk_take,
  output coefs_t     zz,
  output logic [4:0] nu,
  output logic [4:0] nl,
  output logic [1:0] avail
);
  logic [3:0] cnt;
  logic [3:0] scan_idx;

  // scan index of the raster position being written
  always_comb begin
    scan_idx = '0;
    for (int k = 0; k < 16; k++) if (ZIGZAG[k] == cnt) scan_idx = 4'(k);
  end

  assign coef_ready = !blk_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      blk_valid <= 1'b0;
      zz        <= '0;
      nu        <= '0;
      nl        <= '0;
      avail     <= '0;
    end else begin
      if (blk_valid && blk_take) blk_valid <= 1'b0;
      if (coef_valid && coef_ready) begin
        zz[scan_idx] <= coef;
        if (cnt == 4'd0) begin
          nu    <= nu_in;
          nl    <= nl_in;
          avail <= avail_in;
        end
        cnt <= cnt + 1'b1;
        if (cnt == 4'd15) blk_valid <= 1'b1;
      end
    end
  end
endmodule
