// tb_table_walk_engine: self-checking testbench of the programmable table
// walk engine with its default two-level walk program, against a behavioural
// memory holding page tables. Checks the leaf entry returned for mapped
// pages of two contexts, page faults for an unmapped page and an unmapped
// first-level region, the number of memory reads per walk (three: context
// table, level 1, level 2), and a replacement program loaded by the host.
module tb_table_walk_engine;
  import uio_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam addr_t CTX_TABLE = 32'h0010_0000;
  logic start = 0, busy, done, fault;
  ctx_t ctx = 0;
  addr_t vaddr = 0;
  logic [31:0] pte;
  logic mem_valid, mem_ready, mem_resp_valid;
  addr_t mem_addr;
  line_t mem_rdata;
  logic prog_we = 0;
  logic [4:0] prog_addr = 0;
  logic [31:0] prog_data = 0;
  int checks = 0, failures = 0;

  table_walk_engine dut (.*, .ctx_table_base(CTX_TABLE));

  tb_mem_model #(.LATENCY(5), .CTX_TABLE(CTX_TABLE)) u_mem (
    .clk, .rst_n, .req_valid(mem_valid), .req('{we: 1'b0, addr: mem_addr, wdata: '0}),
    .req_ready(mem_ready), .resp_valid(mem_resp_valid), .rdata(mem_rdata));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic walk(ctx_t c, addr_t va, output logic f, output logic [31:0] e, output int cyc);
    start = 1; ctx = c; vaddr = va;
    @(posedge clk); #1;
    start = 0; cyc = 1;
    while (!done) begin @(posedge clk); #1; cyc++; end
    f = fault; e = pte;
  endtask

  logic f;
  logic [31:0] e;
  int cyc, r0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    u_mem.map_page(3, 20'h00401, 20'h12345, 1);
    u_mem.map_page(3, 20'h00402, 20'h00ABC, 0);
    u_mem.map_page(9, 20'hFFFFF, 20'h00042, 1);
    r0 = u_mem.reads;
    walk(3, 32'h0040_1234, f, e, cyc);
    check(!f && e == {20'h12345, 10'h0, 2'b11}, $sformatf("walk ctx 3 page 401 (%h)", e));
    check(u_mem.reads - r0 == 3, "three memory reads per two-level walk");
    // start, 19 instructions, and per load one request cycle plus the
    // memory latency plus one cycle to take the answer
    check(cyc == 1 + 19 + 3 * (1 + 5 + 1), $sformatf("walk latency %0d cycles", cyc));
    walk(3, 32'h0040_2000, f, e, cyc);
    check(!f && e == {20'h00ABC, 10'h0, 2'b01}, "read-only page entry");
    walk(9, 32'hFFFF_F008, f, e, cyc);
    check(!f && e[31:12] == 20'h00042, "ctx 9 top page");
    walk(3, 32'h0040_3000, f, e, cyc);
    check(f, "unmapped page faults");
    walk(3, 32'h8000_0000, f, e, cyc);
    check(f, "unmapped level-1 region faults");
    // host loads a different program: flat mapping, pte = (vaddr & ~0xFFF) | 3
    prog_we = 1;
    prog_addr = 0; prog_data = tw_enc(TW_SHRI, 4, 1, 0, 12); @(posedge clk); #1;
    prog_addr = 1; prog_data = tw_enc(TW_SHLI, 4, 4, 0, 12); @(posedge clk); #1;
    prog_addr = 2; prog_data = tw_enc(TW_ADDI, 5, 0, 0, 3);  @(posedge clk); #1;
    prog_addr = 3; prog_data = tw_enc(TW_OR,   4, 4, 5, 0);  @(posedge clk); #1;
    prog_addr = 4; prog_data = tw_enc(TW_DONE, 0, 4, 0, 0);  @(posedge clk); #1;
    prog_we = 0;
    r0 = u_mem.reads;
    walk(3, 32'h0077_7ABC, f, e, cyc);
    check(!f && e == 32'h0077_7003, "loaded program runs");
    check(u_mem.reads == r0, "loaded program makes no memory reads");
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
