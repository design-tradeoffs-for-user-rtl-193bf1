// tb_uio_top: end-to-end testbench of the user-level I/O design at its
// default parameters (8-entry request queue, 16-entry notification queue,
// four DMA engines, 32-entry 4-way TLB).
//
// The testbench plays the host processor and kernel, host memory (with
// two-level page tables per process) and the remote I/O devices. Processes
// issue requests through the conditional store buffer: seven combining
// stores of the request fields and a conditional flush, retried on failure.
// The "kernel" answers notification interrupts by reading the head of the
// notification queue and popping it, and acknowledges exception interrupts.
//
// Scenario: reads by two processes using the same virtual addresses, a
// write whose buffer the device streams out, a sequence broken by a trap
// (abort and retry), a burst of requests while the network is held so the
// request queue fills (flow control and retry), a read into an unmapped
// buffer (exception interrupt), a read whose notification buffer is
// unmapped (no notification), a remapped page after a TLB
// invalidation, a read into a read-only page (protection fault), and a
// walk program replaced by one that always faults and then restored.
// Checks every notification's fields, the request structure
// written back to the user's notification buffer, all returned data in
// memory at the translated physical addresses and the write data seen by
// the remote device. Each mechanism is counted and must occur.
module tb_uio_top;
  import uio_pkg::*;
  import tb_uio_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam addr_t CTX_TABLE = 32'h0010_0000;
  localparam addr_t UIO_ADDR  = 32'hFFFF_0000;

  // physical address of a process's virtual address
  function automatic addr_t phys(ctx_t c, addr_t va);
    return va + 32'h0100_0000 + addr_t'(c) * 32'h0010_0000;
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
  int n_ok = 0, n_abort = 0, n_full = 0, n_exc = 0, max_busy = 0, n_inv = 0, n_prog = 0;
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

  initial begin
    // page tables: processes 1, 2, 3; buffers at 0x0040_0000, writes at
    // 0x0050_0000, notification buffers at 0x0080_0000
    for (int c = 1; c <= 3; c++) begin
      for (int p = 0; p < 8; p++)
        u_mem.map_page(ctx_t'(c), 20'h00400 + 20'(p), phys(ctx_t'(c), 32'h0040_0000 + p * 4096) >> 12, 1);
      u_mem.map_page(ctx_t'(c), 20'h00800, phys(ctx_t'(c), 32'h0080_0000) >> 12, 1);
      u_mem.map_page(ctx_t'(c), 20'h00500, phys(ctx_t'(c), 32'h0050_0000) >> 12, 0);
    end
    for (int off = 0; off < 256; off += 64)
      u_mem.write_line(phys(1, 32'h0050_0000 + off), mem_pattern(phys(1, 32'h0050_0000 + off)));
    repeat (3) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;

    // 1-3: two processes read the same virtual buffer; one write
    issue(1, rq(1, CMD_READ, 32'h0040_0000, 1024, 32'h0080_0000, 64'hA1));
    issue(2, rq(2, CMD_READ, 32'h0040_0000, 512, 32'h0080_0000, 64'hA2));
    issue(1, rq(1, CMD_WRITE, 32'h0050_0000, 256, 32'h0080_0040, 64'hA3));
    // 4: a trap in the middle of the store sequence
    issue(2, rq(2, CMD_READ, 32'h0040_1000, 256, 32'h0080_0040, 64'hA4), 3);
    wait_notes(4);
    check_read(1, 32'h0040_0000, 1024, 32'h0080_0000, 64'hA1);
    check_read(2, 32'h0040_0000, 512, 32'h0080_0000, 64'hA2);
    check_read(2, 32'h0040_1000, 256, 32'h0080_0040, 64'hA4);
    check(notes.exists(64'hA3), "write request notified");
    check(u_rdev.data_in == 4 && u_rdev.data_err == 0, "write data streamed from the user buffer");

    // 5: network held, requests pile up in the request queue
    hold_net = 1;
    for (int k = 0; k < 10; k++) begin
      flush_result_e r;
      line_t l;
      l = rq(3, CMD_READ, 32'h0040_2000 + 64 * k, 64, 32'h0080_0000 + 64 * k, 64'hB0 + k);
      attempt(3, l, 99, r);
      if (r != FLUSH_OK) begin
        hold_net = 0;
        issue(3, l);
      end
    end
    hold_net = 0;
    wait_notes(14);
    for (int k = 0; k < 10; k++)
      check_read(3, 32'h0040_2000 + 64 * k, 64, 32'h0080_0000 + 64 * k, 64'hB0 + k);

    // 6: buffer not mapped -> exception interrupt, notification still sent
    issue(1, rq(1, CMD_READ, 32'h0060_0000, 128, 32'h0080_0080, 64'hC1));
    // 7: notification buffer not mapped -> no notification
    issue(1, rq(1, CMD_READ, 32'h0040_3000, 64, 32'h0070_0000, 64'hC2));
    // 8: remap a page of process 2, invalidate the device TLB entry, read again
    u_mem.map_page(2, 20'h00400, 20'h03333, 1);
    inv_valid = 1; inv_ctx = 2; inv_vaddr = 32'h0040_0000; @(posedge clk); #1; inv_valid = 0;
    n_inv++;
    issue(2, rq(2, CMD_READ, 32'h0040_0100, 64, 32'h0080_00C0, 64'hC3));
    wait_notes(16);
    repeat (200) @(posedge clk);
    #1;
    check(notes.exists(64'hC1), "faulting read still notified");
    check(exc_addrs.size() >= 2, "exception interrupts raised");
    check(exc_addrs.size() > 0 && exc_addrs[0] == 32'h0060_0000, "exception reports the unmapped address");
    check_read(1, 32'h0040_3000, 64, 32'h0070_0000, 64'hC2, 0);
    check(drop_count == 1, "dropped notification counted");
    check(u_mem.get_line(32'h0333_3100) == data_pattern(2, 32'h0040_0100), "remapped page used after invalidation");

    // 9: read into a read-only page -> protection fault from the TLB
    issue(2, rq(2, CMD_READ, 32'h0050_0000, 64, 32'h0080_0100, 64'hC4));
    wait_notes(17);
    repeat (50) @(posedge clk);
    #1;
    check(exc_addrs.size() > 0 && exc_addrs[exc_addrs.size() - 1] == 32'h0050_0000,
          "write to a read-only page raises an exception");

    // 10: walk program replaced by one that always faults, then restored
    prog_we = 1; prog_addr = 0; prog_data = tw_enc(TW_FAULT, 0, 0, 0, 0); @(posedge clk); #1; prog_we = 0;
    inv_valid = 1; inv_ctx = 3; inv_vaddr = 32'h0040_2000; @(posedge clk); #1; inv_valid = 0;
    n_inv++;
    issue(3, rq(3, CMD_READ, 32'h0040_2000, 64, 32'h0080_0140, 64'hC5));
    for (int t = 0; t < 5000 && !(exc_addrs.size() > 0 && exc_addrs[exc_addrs.size() - 1] == 32'h0040_2000); t++)
      @(posedge clk);
    check(exc_addrs[exc_addrs.size() - 1] == 32'h0040_2000, "loaded walk program is the one that runs");
    repeat (200) @(posedge clk);
    #1;
    prog_we = 1; prog_addr = 0; prog_data = tw_default_prog(0); @(posedge clk); #1; prog_we = 0;
    n_prog++;
    issue(3, rq(3, CMD_READ, 32'h0040_2000, 64, 32'h0080_0180, 64'hC6));
    for (int t = 0; t < 5000 && !notes.exists(64'hC6); t++) @(posedge clk);
    #1;
    check_read(3, 32'h0040_2000, 64, 32'h0080_0180, 64'hC6);

    // mechanisms
    check(n_ok >= 17, $sformatf("successful flushes (%0d)", n_ok));
    check(n_abort >= 1, $sformatf("aborted flushes (%0d)", n_abort));
    check(n_full >= 1, $sformatf("flow-control refusals (%0d)", n_full));
    check(tlb_misses > 0 && tlb_hits > 0, $sformatf("TLB hits %0d misses %0d", tlb_hits, tlb_misses));
    check(max_busy >= 2, $sformatf("DMA engines busy at once (%0d)", max_busy));
    check(n_inv == 2, "TLB invalidations issued");
    check(n_prog == 1, "walk program reloaded");
    check(n_exc >= 4, $sformatf("exception interrupts (%0d)", n_exc));
    check(drop_count >= 1, $sformatf("dropped notifications (%0d)", drop_count));
    check(notif_count >= 18, $sformatf("notifications sent (%0d)", notif_count));
    $display("mechanisms: flush ok %0d abort %0d full %0d, tlb hit %0d miss %0d, max dma busy %0d, exceptions %0d, dropped %0d, invalidations %0d",
             n_ok, n_abort, n_full, tlb_hits, tlb_misses, max_busy, n_exc, drop_count, n_inv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
