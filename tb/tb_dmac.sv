// tb_dmac: self-checking testbench of the single-channel DMA controller.
// A 4096-word memory model answers reads on the next clock. Checked: a packet-mode copy
// and a burst-block copy (2-D, different source and destination strides) land exactly
// where expected and nothing else is written; with the bus always granted a transfer of
// N words issues one read per clock and finishes N + 2 clocks after the start command;
// with a randomly withheld grant the data are still correct.
module tb_dmac;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cfg_we, busy, done, gnt, rd_en, wr_en;
  logic [2:0]  cfg_addr;
  logic [31:0] cfg_wdata, rd_addr, wr_addr, rd_data, wr_data;
  logic [31:0] mem [4096], golden [4096];
  int checks = 0, failures = 0, rand_gnt = 0;
  int n_packet = 0, n_block = 0;

  dmac dut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .busy, .done, .gnt, .rd_en,
            .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  always @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr[11:0]];
    if (wr_en) mem[wr_addr[11:0]] <= wr_data;
    gnt <= rand_gnt ? 1'($urandom_range(0, 2) != 0) : 1'b1;
  end

  task automatic cfg(input int a, input logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = 3'(a); cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic run(input bit block, input int src, input int dst, input int count,
                     input int rows, input int sstr, input int dstr);
    int cyc, words;
    for (int i = 0; i < 4096; i++) golden[i] = mem[i];
    words = block ? count * rows : count;
    for (int r = 0; r < (block ? rows : 1); r++)
      for (int c = 0; c < count; c++)
        golden[(dst + r * dstr + c) % 4096] = mem[(src + r * sstr + c) % 4096];
    cfg(0, src); cfg(1, dst); cfg(2, count); cfg(3, rows); cfg(4, sstr); cfg(5, dstr);
    @(negedge clk); cfg_we = 1; cfg_addr = 6; cfg_wdata = {30'd0, block, 1'b1};
    @(negedge clk); cfg_we = 0;
    cyc = 1;
    while (!done && cyc < 20000) begin @(negedge clk); cyc++; end
    if (block) n_block++; else n_packet++;
    if (!rand_gnt) begin
      checks++;
      if (cyc != words + 2) begin failures++; $display("FAIL %0d words took %0d clocks", words, cyc); end
    end
    for (int i = 0; i < 4096; i++) begin
      checks++;
      if (mem[i] !== golden[i]) begin
        failures++;
        if (failures < 10) $display("FAIL mem[%0d] = %h exp %h", i, mem[i], golden[i]);
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    for (int i = 0; i < 4096; i++) mem[i] = $urandom;
    repeat (2) @(posedge clk); rst_n = 1;
    run(0, 100, 2000, 37, 0, 0, 0);           // packet
    run(1, 64, 3000, 16, 16, 352 / 4, 16);    // 16x16 block of a frame row 88 words wide
    run(1, 1000, 10, 4, 8, 40, 5);            // small block, strides differ
    rand_gnt = 1;
    run(0, 3500, 123, 200, 0, 0, 0);
    run(1, 10, 2500, 8, 8, 64, 8);
    $display("packet transfers %0d, block transfers %0d", n_packet, n_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
