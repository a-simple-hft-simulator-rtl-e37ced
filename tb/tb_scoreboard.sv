// tb_scoreboard: self-checking test of the per-symbol scoreboard. Symbols
// are allocated until the table is full (the ninth finds no room), lookups
// must return the allocating index, and each entry's five status bits
// must appear one cycle after their sources, with `stalled` the OR of the
// four stall bits (overflow excluded). Reset clears the table.
module tb_scoreboard;
  import hft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] st_inserting = '0, st_popping = '0, st_page_fault = '0;
  logic [7:0] st_compacting = '0, st_overflow = '0;
  logic [20:0] lk_symbol = '0;
  logic lk_alloc = 1'b0, lk_hit, lk_room, lk_stalled;
  logic [2:0] lk_idx;
  logic [4:0] lk_status;
  logic [7:0] active;

  scoreboard dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [20:0] syms [9];
  int idx_of [9];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 9; s++) syms[s] = 21'($urandom) | 21'h1;
    // allocation
    for (int s = 0; s < 9; s++) begin
      @(negedge clk);
      lk_symbol = syms[s];
      #1;
      check(!lk_hit, "new symbol misses");
      check(lk_room == (s < 8), $sformatf("room for symbol %0d", s));
      idx_of[s] = lk_idx;
      lk_alloc = 1;
      @(negedge clk);
      lk_alloc = 0;
      #1;
      if (s < 8) check(lk_hit && lk_idx == 3'(idx_of[s]), "hit after allocation");
      else check(!lk_hit, "ninth symbol not allocated");
    end
    check(active == 8'hff, "all entries active");
    // status bits and stalled
    for (int i = 0; i < 500; i++) begin
      logic [4:0] st [8];
      @(negedge clk);
      st_inserting = 8'($urandom); st_popping = 8'($urandom);
      st_page_fault = 8'($urandom); st_compacting = 8'($urandom);
      st_overflow = 8'($urandom);
      for (int k = 0; k < 8; k++) st[k] = {st_overflow[k], st_compacting[k], st_page_fault[k],
                                           st_popping[k], st_inserting[k]};
      @(negedge clk);
      for (int s = 0; s < 8; s++) begin
        lk_symbol = syms[s];
        #1;
        check(lk_status == st[idx_of[s]], "status bits one cycle after their sources");
        check(lk_stalled == |st[idx_of[s]][3:0], "stalled excludes overflow");
      end
    end
    // reset clears the table
    @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    lk_symbol = syms[0];
    #1;
    check(active == '0 && !lk_hit && lk_room, "cleared by reset");
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
