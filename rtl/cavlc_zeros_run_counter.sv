// cavlc_zeros_run_counter: for the i-th nonzero coefficient of the reversed
// block (i = 0 is the highest-frequency one) gives run_before[i], the
// zeros between it and the next nonzero coefficient towards DC, and
// zeros_left[i], the zeros still ahead of it towards DC (zeros_left[0] =
// total_zeros). Entries past the last nonzero are zero. Combinational.
// The document names this actor; its combinational form is this design's
// choice.
module cavlc_zeros_run_counter
  import cavlc_pkg::*;
(
  input  coefs_t     rs,
  output logic [3:0] run_before [16],
  output logic [4:0] zeros_left [16]
);
  always_comb begin
    int n, run, zl;
    logic started;
    for (int i = 0; i < 16; i++) begin
      run_before[i] = '0;
      zeros_left[i] = '0;
    end
    // total zeros ahead of the highest-frequency nonzero coefficient
    zl = 0;
    started = 1'b0;
    for (int j = 0; j < 16; j++) begin
      if (rs[j] != 0) started = 1'b1;
      else if (started) zl++;
    end
    n = -1;
    run = 0;
    for (int j = 0; j < 16; j++) begin
      if (rs[j] != 0) begin
        if (n >= 0) begin
          run_before[n] = 4'(run);
          zl -= run;
        end
        n++;
        zeros_left[n] = 5'(zl);
        run = 0;
      end else if (n >= 0) run++;
    end
    if (n >= 0) run_before[n] = 4'(run);
  end
endmodule
