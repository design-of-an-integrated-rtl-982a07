// fdi: fault detection index.
//
// Each valid error sample e of the fault detection system is compared with
// THRESHOLD; the flag FD[k] is 1 when |e| exceeds it. The flags are summed
// over consecutive, non-overlapping frames of N samples,
//   FDI[j] = sum of FD[k] for k = N*j .. N*(j+1)-1,
// and at the end of each frame the sum is stored in fdi_out (one new value
// every N error samples, with fdi_valid for one clock) and the count restarts.
// The stored value saturates at FDI_MAX.
//
// The threshold of 0.25, the frame of 256 samples, the per-frame sum and the
// 16-bit result follow the document. Comparing the magnitude of e, the
// saturation at 255 (the document reports a saturated FDI of 255 and a full
// scale of 0 to 255) and the zero reset value are this design's reading.
module fdi
  import fdd_pkg::*;
#(
  parameter int unsigned N         = 256,
  parameter bus_t        THRESHOLD = bus_t'(1 << (FRAC_BITS - 2)),  // 0.25
  parameter int unsigned FDI_MAX   = 255
)(
  input  logic clk,
  input  logic rst,
  input  bus_t e_in,
  input  logic in_valid,
  output logic fd_flag,      // FD[k] of the current sample (combinational)
  output bus_t fdi_out,
  output logic fdi_valid
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] k_cnt;    // samples seen in this frame
  logic [CW-1:0] fd_sum;   // flags counted in this frame
  logic [CW-1:0] fd_sum_next;
  bus_t          e_abs;

  assign e_abs       = (e_in < 0) ? ((e_in == 16'sh8000) ? 16'sh7fff : -e_in) : e_in;
  assign fd_flag     = (e_abs > THRESHOLD);
  assign fd_sum_next = fd_sum + CW'(fd_flag);

  always_ff @(posedge clk) begin
    if (rst) begin
      k_cnt     <= '0;
      fd_sum    <= '0;
      fdi_out   <= '0;
      fdi_valid <= 1'b0;
    end else begin
      fdi_valid <= 1'b0;
      if (in_valid) begin
        if (k_cnt == CW'(N - 1)) begin
          k_cnt     <= '0;
          fd_sum    <= '0;
          fdi_out   <= (fd_sum_next > CW'(FDI_MAX)) ? bus_t'(FDI_MAX) : bus_t'(fd_sum_next);
          fdi_valid <= 1'b1;
        end else begin
          k_cnt  <= k_cnt + 1'b1;
          fd_sum <= fd_sum_next;
        end
      end
    end
  end

endmodule
