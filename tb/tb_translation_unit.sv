// tb_translation_unit: self-checking testbench of the translation unit
// (device TLB plus table walk engine) against page tables in a behavioural
// memory. Checks: a first access misses, is walked, filled and answered
// with the right physical address; a second access to the page hits without
// memory traffic and answers in two cycles; a write to a read-only page and
// an unmapped page are answered with fault; after the OS changes a mapping
// and invalidates the entry, the new mapping is walked in.
module tb_translation_unit;
  import uio_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam addr_t CTX_TABLE = 32'h0010_0000;
  logic req_valid = 0, req_ready, resp_valid;
  xlate_req_t req = '0;
  xlate_resp_t resp;
  logic mem_valid, mem_ready, mem_resp_valid;
  addr_t mem_addr;
  line_t mem_rdata;
  logic inv_valid = 0, prog_we = 0;
  ctx_t inv_ctx = 0;
  addr_t inv_vaddr = 0;
  logic [4:0] prog_addr = 0;
  logic [31:0] prog_data = 0, hit_count, miss_count;
  int checks = 0, failures = 0;

  translation_unit dut (.*, .ctx_table_base(CTX_TABLE));

  tb_mem_model #(.LATENCY(4), .CTX_TABLE(CTX_TABLE)) u_mem (
    .clk, .rst_n, .req_valid(mem_valid), .req('{we: 1'b0, addr: mem_addr, wdata: '0}),
    .req_ready(mem_ready), .resp_valid(mem_resp_valid), .rdata(mem_rdata));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xlate(ctx_t c, addr_t va, logic wr, output xlate_resp_t r, output int cyc);
    req_valid = 1; req = '{ctx: c, vaddr: va, write: wr};
    do @(negedge clk); while (!req_ready);  // taken at the next edge
    @(posedge clk); #1;
    req_valid = 0; cyc = 1;
    while (!resp_valid) begin @(posedge clk); #1; cyc++; end
    r = resp;
  endtask

  xlate_resp_t r;
  int cyc, rd0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    u_mem.map_page(4, 20'h10000, 20'h0AAAA, 1);
    u_mem.map_page(4, 20'h10001, 20'h0BBBB, 0);
    rd0 = u_mem.reads;
    xlate(4, 32'h1000_0040, 1, r, cyc);
    check(!r.fault && r.paddr == 32'h0AAA_A040, "miss walked and translated");
    check(miss_count == 1 && hit_count == 0, $sformatf("counted as a miss (%0d %0d)", miss_count, hit_count));
    check(u_mem.reads - rd0 == 3, "walk made three reads");
    rd0 = u_mem.reads;
    xlate(4, 32'h1000_0FC0, 0, r, cyc);
    check(!r.fault && r.paddr == 32'h0AAA_AFC0, "hit translated");
    check(cyc == 2, $sformatf("hit answered in two cycles (%0d)", cyc));
    check(u_mem.reads == rd0 && hit_count == 1, "hit makes no memory traffic");
    xlate(4, 32'h1000_1000, 1, r, cyc);
    check(r.fault, "write to read-only page faults");
    xlate(4, 32'h1000_1008, 0, r, cyc);
    check(!r.fault && r.paddr == 32'h0BBB_B008, "read of read-only page allowed");
    xlate(4, 32'h1000_2000, 0, r, cyc);
    check(r.fault, "unmapped page faults");
    xlate(5, 32'h1000_0040, 0, r, cyc);
    check(r.fault, "other context has no mapping");
    // OS remaps the page and invalidates the device TLB entry
    u_mem.map_page(4, 20'h10000, 20'h0CCCC, 1);
    xlate(4, 32'h1000_0040, 0, r, cyc);
    check(r.paddr == 32'h0AAA_A040, "stale entry used until invalidated");
    inv_valid = 1; inv_ctx = 4; inv_vaddr = 32'h1000_0000; @(posedge clk); #1; inv_valid = 0;
    xlate(4, 32'h1000_0040, 0, r, cyc);
    check(!r.fault && r.paddr == 32'h0CCC_C040, "new mapping after invalidation");
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
