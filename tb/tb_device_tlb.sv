// tb_device_tlb: self-checking testbench of the device TLB at its default
// size (32 entries, 4 ways). Checks misses before a fill, hits with the
// right physical address one cycle after the lookup, separation of contexts
// with the same virtual page, the write-protection flag, invalidation of one
// context's page only, and replacement when a fifth page maps to a full set.
module tb_device_tlb;
  import uio_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lk_valid = 0, lk_write = 0, lk_done, lk_hit, lk_fault;
  ctx_t lk_ctx = 0, fill_ctx = 0, inv_ctx = 0;
  addr_t lk_vaddr = 0, lk_paddr, fill_vaddr = 0, inv_vaddr = 0;
  logic fill_valid = 0, inv_valid = 0;
  logic [31:0] fill_pte = 0;
  int checks = 0, failures = 0;

  device_tlb dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic lookup(ctx_t c, addr_t va, logic wr, output logic hit, output logic flt,
                        output addr_t pa);
    lk_valid = 1; lk_ctx = c; lk_vaddr = va; lk_write = wr;
    @(posedge clk); #1;
    lk_valid = 0;
    check(lk_done, "answer one cycle after lookup");
    hit = lk_hit; flt = lk_fault; pa = lk_paddr;
  endtask

  task automatic fill(ctx_t c, addr_t va, logic [19:0] ppn, logic wr);
    fill_valid = 1; fill_ctx = c; fill_vaddr = va; fill_pte = {ppn, 10'h0, wr, 1'b1};
    @(posedge clk); #1;
    fill_valid = 0;
  endtask

  task automatic inval(ctx_t c, addr_t va);
    inv_valid = 1; inv_ctx = c; inv_vaddr = va;
    @(posedge clk); #1;
    inv_valid = 0;
  endtask

  logic h, f;
  addr_t pa;
  int hits;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    lookup(1, 32'h0040_1234, 0, h, f, pa); check(!h, "miss before fill");
    fill(1, 32'h0040_1000, 20'h12345, 1);
    lookup(1, 32'h0040_1234, 0, h, f, pa);
    check(h && !f && pa == 32'h1234_5234, "hit with translated address");
    lookup(2, 32'h0040_1234, 0, h, f, pa); check(!h, "other context misses");
    fill(2, 32'h0040_1000, 20'h00777, 0);
    lookup(2, 32'h0040_1ABC, 0, h, f, pa); check(h && pa == 32'h0077_7ABC, "context 2 own mapping");
    lookup(1, 32'h0040_1ABC, 0, h, f, pa); check(h && pa == 32'h1234_5ABC, "context 1 mapping kept");
    lookup(2, 32'h0040_1ABC, 1, h, f, pa); check(h && f, "write to read-only page flagged");
    lookup(1, 32'h0040_1ABC, 1, h, f, pa); check(h && !f, "write to writable page allowed");
    inval(1, 32'h0040_1000);
    lookup(1, 32'h0040_1ABC, 0, h, f, pa); check(!h, "invalidated entry misses");
    lookup(2, 32'h0040_1ABC, 0, h, f, pa); check(h, "other context survives invalidation");
    // fill all 32 entries: pages 0..31 of context 5 (8 sets x 4 ways)
    for (int p = 0; p < 32; p++) fill(5, 32'h1000_0000 + p * 32'h1000, 20'(p + 20'h100), 1);
    hits = 0;
    for (int p = 0; p < 32; p++) begin
      lookup(5, 32'h1000_0000 + p * 32'h1000, 0, h, f, pa);
      if (h && pa == {20'(p + 20'h100), 12'h0}) hits++;
    end
    // context 2's page occupied one way of set 1, so one page of set 1 was evicted
    check(hits == 31, $sformatf("32 entries hold 31 new pages plus one old (%0d)", hits));
    // a fifth page in set 0 evicts exactly one of the four pages there
    fill(5, 32'h2000_0000, 20'h0ABCD, 1);
    hits = 0;
    for (int p = 0; p < 32; p += 8) begin
      lookup(5, 32'h1000_0000 + p * 32'h1000, 0, h, f, pa);
      if (h) hits++;
    end
    check(hits == 3, "replacement evicts one way of the set");
    lookup(5, 32'h2000_0040, 0, h, f, pa); check(h && pa == 32'h0ABC_D040, "new page present");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
