// tb_page_table: self-checking test of the page table. After reset the
// table must report busy while it clears itself, then every entry must
// read invalid. Random mappings and unmappings are then compared with a
// model through both read ports (data one cycle after the index).
module tb_page_table;
  import hft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [10:0] rd0_idx = '0, rd1_idx = '0, wr_idx = '0;
  logic rd0_valid, rd1_valid, init_busy;
  logic [7:0] rd0_pfn, rd1_pfn, wr_pfn = '0;
  logic wr_en = 1'b0, wr_valid = 1'b0;

  page_table dut (.clk, .rst_n, .rd0_idx, .rd0_valid, .rd0_pfn, .rd1_idx,
                  .rd1_valid, .rd1_pfn, .wr_en, .wr_idx, .wr_valid, .wr_pfn,
                  .init_busy);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [8:0] model [2048];

  initial begin
    int busy_cycles;
    busy_cycles = 0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (init_busy) begin @(negedge clk); busy_cycles++; end
    check(busy_cycles >= 2040, $sformatf("cleared over %0d cycles", busy_cycles));
    // every entry invalid, read through both ports
    for (int i = 0; i < 2048; i += 2) begin
      rd0_idx = 11'(i); rd1_idx = 11'(i + 1);
      @(negedge clk);
      check(!rd0_valid && !rd1_valid, $sformatf("entry %0d invalid after reset", i));
    end
    // random writes and reads
    for (int i = 0; i < 5000; i++) begin
      logic [10:0] a0, a1;
      wr_en = ($urandom_range(1, 0) != 0);
      wr_idx = 11'($urandom_range(63, 0) * 32 + $urandom_range(1, 0));
      wr_valid = ($urandom_range(3, 0) != 0);
      wr_pfn = 8'($urandom);
      a0 = 11'($urandom_range(63, 0) * 32 + $urandom_range(1, 0));
      a1 = 11'($urandom_range(63, 0) * 32 + $urandom_range(1, 0));
      rd0_idx = a0; rd1_idx = a1;
      @(negedge clk);
      // the read returns the entry as it was before this cycle's write
      check({rd0_valid, rd0_pfn} == model[a0], "read port 0");
      check({rd1_valid, rd1_pfn} == model[a1], "read port 1");
      if (wr_en) model[wr_idx] = {wr_valid, wr_pfn};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
