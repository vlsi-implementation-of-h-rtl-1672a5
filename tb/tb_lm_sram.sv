// tb_lm_sram: self-checking testbench of the local memory at the DB engine's capacity
// (5120 bits = 160 words of 32 bits). Writes a pattern to every word, reads it back in
// another order and checks each word on the clock after the read, plus a shadow-model
// random read/write mix.
module tb_lm_sram;
  localparam int BITS = 5120, WIDTH = 32, DEPTH = BITS / WIDTH;

  logic clk = 0;
  always #5 clk = ~clk;

  logic             en, we;
  logic [7:0]       addr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  lm_sram #(.BITS(BITS), .WIDTH(WIDTH)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  task automatic wr(input int a, input logic [WIDTH-1:0] d);
    @(negedge clk); en = 1; we = 1; addr = 8'(a); wdata = d;
    shadow[a] = d;
    @(negedge clk); en = 0; we = 0;
  endtask

  task automatic rd_check(input int a);
    @(negedge clk); en = 1; we = 0; addr = 8'(a);
    @(negedge clk); en = 0;
    checks++;
    if (rdata !== shadow[a]) begin
      failures++;
      if (failures < 10) $display("FAIL addr %0d: got %h exp %h", a, rdata, shadow[a]);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    for (int a = 0; a < DEPTH; a++) wr(a, 32'h5A00_0000 ^ (a * 32'h0101_0101));
    for (int a = DEPTH - 1; a >= 0; a--) rd_check(a);
    for (int it = 0; it < 600; it++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      if ($urandom_range(0, 1) == 1) wr(a, $urandom);
      else                           rd_check(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
