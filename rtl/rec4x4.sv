// rec4x4: reconstruction of one 4x4 block of samples.
// Each output sample is the prediction (intra or motion-compensated) plus the decoded
// residual, clipped to the 8-bit range 0..255.
// Interface: in_valid with pred/res; recon/out_valid one clock later, one block per clock.
// Arrays are in raster order (index = row*4 + col).
// The document names the reconstruction engine; the adder-and-clip datapath is the
// standard's definition, and the block size and one-cycle latency are this design's choices.
module rec4x4
  import h264_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  pix_t  pred  [16],
  input  coef_t res   [16],
  output logic  out_valid,
  output pix_t  recon [16]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < 16; i++) recon[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int i = 0; i < 16; i++) recon[i] <= clip1(int'(pred[i]) + int'(res[i]));
    end
  end

endmodule
