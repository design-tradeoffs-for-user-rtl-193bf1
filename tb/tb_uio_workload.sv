// tb_uio_workload: the database table-scan load at default parameters.
// Sixteen processes, one per concurrent query, each keep one 16 KB read
// request in flight, for several rounds that walk through consecutive
// 16 KB pieces of their table, the way a scanning query reads its file.
// All requests are started through the conditional store buffer with
// retry, so flow control pushes back when the 8-entry request queue is
// full; the 16 buffers span 64 pages, twice the device TLB, so the walk
// engine is busy throughout. Checks every notification, every returned
// structure and every line of data, and reports request, TLB and
// flow-control counts.
module tb_uio_workload;
  import uio_pkg::*;
  import tb_uio_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam addr_t CTX_TABLE = 32'h0010_0000;
  localparam addr_t UIO_ADDR  = 32'hFFFF_0000;

  // physical address of a process's virtual address
  function automatic addr_t phys(ctx_t c, addr_t va);
    return va + addr_t'(c) * 32'h0100_0000;
  endfunction

  logic store_valid = 0, flush_valid = 0, csb_ready, flush_done, trap_or_irq = 0;
  addr_t store_addr = 0, flush_addr = 0, csb_burst_addr;
  word_t store_data = 0;
  logic [7:0] flush_count = 0, csb_hits;
  flush_result_e flush_result;
  ctx_t pid = 0;
  logic notif_irq, nq_pop = 0;
  logic [2:0] nq_reg_addr = 0;
  word_t nq_reg_rdata;
  logic mem_valid, mem_ready, mem_resp_valid;
  mem_req_t mem_req;
  line_t mem_rdata;
  logic net_tx_valid, net_tx_ready, net_rx_valid, net_rx_ready, rdev_tx_ready;
  net_pkt_t net_tx_pkt, net_rx_pkt;
  logic inv_valid = 0, prog_we = 0;
  ctx_t inv_ctx = 0;
  addr_t inv_vaddr = 0;
  logic [4:0] prog_addr = 0;
  logic [31:0] prog_data = 0;
  logic exc_irq, exc_ack = 0;
  ctx_t exc_ctx;
  addr_t exc_vaddr;
  logic [31:0] tlb_hits, tlb_misses, req_count, data_count, notif_count, fault_count,
               drop_count, dma_jobs;
  logic [3:0] dma_busy;
  logic hold_net = 0;

  uio_top dut (.*, .ctx_table_base(CTX_TABLE));

  tb_mem_model #(.LATENCY(8), .CTX_TABLE(CTX_TABLE)) u_mem (
    .clk, .rst_n, .req_valid(mem_valid), .req(mem_req),
    .req_ready(mem_ready), .resp_valid(mem_resp_valid), .rdata(mem_rdata));

  assign net_tx_ready = rdev_tx_ready && !hold_net;
  tb_remote_dev #(.DELAY(30), .PHYS_OFF(32'h0110_0000)) u_rdev (
    .clk, .rst_n, .tx_valid(net_tx_valid && !hold_net), .tx_pkt(net_tx_pkt), .tx_ready(rdev_tx_ready),
    .rx_valid(net_rx_valid), .rx_pkt(net_rx_pkt), .rx_ready(net_rx_ready));

  int checks = 0, failures = 0;
  int n_ok = 0, n_abort = 0, n_full = 0, n_exc = 0, max_busy = 0, n_inv = 0;
  typedef struct { word_t pid, nbuf, handler, arg; } note_t;
  note_t notes [word_t];
  addr_t exc_addrs[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- processor: CSB instruction sequences ----------------
  task automatic store(addr_t a, word_t d);
    while (!csb_ready) begin @(posedge clk); #1; end
    store_valid = 1; store_addr = a; store_data = d;
    @(posedge clk); #1;
    store_valid = 0;
  endtask

  task automatic flush(logic [7:0] n, output flush_result_e r);
    while (!csb_ready) begin @(posedge clk); #1; end
    flush_valid = 1; flush_addr = UIO_ADDR; flush_count = n;
    @(posedge clk); #1;
    flush_valid = 0;
    while (!flush_done) begin @(posedge clk); #1; end
    r = flush_result;
  endtask

  // one attempt; trap_after < 7 injects a trap after that many stores
  task automatic attempt(ctx_t p, line_t l, int trap_after, output flush_result_e r);
    pid = p;
    for (int s = 0; s < 7; s++) begin
      if (s == trap_after) begin
        trap_or_irq = 1; @(posedge clk); #1; trap_or_irq = 0;
      end
      store(UIO_ADDR + 8 * s, l[s*64 +: 64]);
    end
    flush(7, r);
    case (r)
      FLUSH_OK:    n_ok++;
      FLUSH_FULL:  n_full++;
      default:     n_abort++;
    endcase
  endtask

  // issue with retry and exponential backoff
  task automatic issue(ctx_t p, line_t l, int trap_after = 99);
    flush_result_e r;
    int backoff = 4;
    attempt(p, l, trap_after, r);
    while (r != FLUSH_OK) begin
      repeat (backoff) @(posedge clk);
      #1;
      if (backoff < 256) backoff *= 2;
      attempt(p, l, 99, r);
    end
    check(csb_burst_addr == UIO_ADDR, "burst issued to the device address");
  endtask

  function automatic line_t rq(ctx_t c, logic [31:0] cmd, addr_t b, logic [31:0] len, addr_t nb, word_t arg);
    // the context word is left zero: the CSB inserts the process ID
    return make_req(64'hCA00 + arg, cmd, 64'h0, b, len, nb, 32'h1000_0000 + addr_t'(arg), arg, 16'h0);
  endfunction

  // ---------------- kernel: notification and exception handlers ----------------
  initial forever begin
    @(posedge clk); #2;
    if (notif_irq) begin
      note_t n;
      nq_reg_addr = 0; #1; n.pid = nq_reg_rdata;
      nq_reg_addr = 1; #1; n.nbuf = nq_reg_rdata;
      nq_reg_addr = 2; #1; n.handler = nq_reg_rdata;
      nq_reg_addr = 3; #1; n.arg = nq_reg_rdata;
      notes[n.arg] = n;
      nq_pop = 1; @(posedge clk); #1; nq_pop = 0;
    end
    if (exc_irq) begin
      n_exc++;
      exc_addrs.push_back(exc_vaddr);
      exc_ack = 1; @(posedge clk); #1; exc_ack = 0;
    end
  end

  always @(posedge clk) if ($countones(dma_busy) > max_busy) max_busy = $countones(dma_busy);

  // ---------------- checks of one completed read ----------------
  task automatic check_read(ctx_t c, addr_t b, int len, addr_t nb, word_t arg, bit expect_note = 1);
    int bad = 0;
    line_t ub;
    if (!expect_note) begin
      check(!notes.exists(arg), $sformatf("no notification for request %h", arg));
      return;
    end
    check(notes.exists(arg), $sformatf("notification for request %h", arg));
    if (!notes.exists(arg)) return;
    check(notes[arg].pid == 64'(c) && notes[arg].nbuf == 64'(nb) &&
          notes[arg].handler == 64'(32'h1000_0000 + addr_t'(arg)), $sformatf("notification fields %h", arg));
    ub = u_mem.get_line(phys(c, nb));
    check(ub[RW_COMMAND*64 + 32 +: 32] == 32'h600D && ub[RW_REQ_ARG*64 +: 64] == arg &&
          ub[RW_CONTEXT*64 +: 16] == c, $sformatf("request structure in notification buffer %h", arg));
    for (int off = 0; off < len; off += 64)
      if (u_mem.get_line(phys(c, b + off)) != data_pattern(c, b + off)) bad++;
    check(bad == 0, $sformatf("read data in user buffer %h (%0d bad lines)", arg, bad));
  endtask

  task automatic wait_notes(int n);
    int t = 0;
    while (notes.size() < n && t < 20000) begin @(posedge clk); t++; end
    #1;
  endtask

  localparam int QUERIES = 16;
  localparam int ROUNDS  = 3;
  localparam int REQ_LEN = 16384;

  initial begin
    int expect_n;
    for (int c = 1; c <= QUERIES; c++) begin
      for (int p = 0; p < 4 * ROUNDS; p++)
        u_mem.map_page(ctx_t'(c), 20'h00400 + 20'(p), phys(ctx_t'(c), 32'h0040_0000 + p * 4096) >> 12, 1);
      u_mem.map_page(ctx_t'(c), 20'h00800, phys(ctx_t'(c), 32'h0080_0000) >> 12, 1);
    end
    repeat (3) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    expect_n = 0;
    // the network stalls for a while at the start, so the request queue
    // fills and the CSB flow control answers "full"
    hold_net = 1;
    fork begin repeat (3000) @(posedge clk); #1; hold_net = 0; end join_none
    for (int r = 0; r < ROUNDS; r++) begin
      for (int c = 1; c <= QUERIES; c++) begin
        line_t l;
        l = rq(ctx_t'(c), CMD_READ, 32'h0040_0000 + r * REQ_LEN, REQ_LEN, 32'h0080_0000 + 64 * r, word_t'(256 * r + c));
        issue(ctx_t'(c), l);
      end
      expect_n += QUERIES;
      for (int t = 0; t < 400000 && notes.size() < expect_n; t++) begin @(posedge clk); #1; end
      for (int c = 1; c <= QUERIES; c++)
        check_read(ctx_t'(c), 32'h0040_0000 + r * REQ_LEN, REQ_LEN, 32'h0080_0000 + 64 * r, word_t'(256 * r + c));
    end
    check(req_count == QUERIES * ROUNDS, $sformatf("requests forwarded (%0d)", req_count));
    check(data_count == QUERIES * ROUNDS * REQ_LEN / 64, $sformatf("data lines received (%0d)", data_count));
    check(tlb_misses >= QUERIES * 4 * ROUNDS, $sformatf("TLB misses walked (%0d)", tlb_misses));
    check(n_full > 0, $sformatf("flow control pushed back (%0d)", n_full));
    check(max_busy == 4, $sformatf("all DMA engines busy at once (%0d)", max_busy));
    check(n_exc == 0 && drop_count == 0, "no exceptions");
    $display("workload: %0d requests, %0d lines, flushes ok %0d full %0d, TLB hits %0d misses %0d, %0t",
             req_count, data_count, n_ok, n_full, tlb_hits, tlb_misses, $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
