// tb_rec4x4: self-checking testbench of the reconstruction adder.
// Random predictions and residuals (including values that overflow both ends of the
// sample range) are applied; each output must equal the clipped sum one clock later.
module tb_rec4x4;
  import h264_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid, out_valid;
  pix_t  pred [16], recon [16];
  coef_t res [16];
  int    checks = 0, failures = 0, e;

  rec4x4 dut (.clk, .rst_n, .in_valid, .pred, .res, .out_valid, .recon);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0;
    for (int i = 0; i < 16; i++) begin pred[i] = 0; res[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      for (int i = 0; i < 16; i++) begin
        pred[i] = 8'($urandom);
        res[i]  = coef_t'($signed($urandom_range(0, 800)) - 400);
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL: out_valid missing"); end
      for (int i = 0; i < 16; i++) begin
        e = int'(pred[i]) + int'(res[i]);
        e = (e < 0) ? 0 : (e > 255) ? 255 : e;
        checks++;
        if (int'(recon[i]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL [%0d]: %0d + %0d -> %0d exp %0d", i, pred[i], res[i], recon[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
