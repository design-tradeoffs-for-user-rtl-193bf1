// tb_uio_device: self-checking testbench of the UIO network interface
// device on its own, at default parameters. Request structures are
// delivered as bus bursts (as the conditional store buffer would send
// them), host memory and remote devices are behavioural models, and the
// notification port is always ready. Checks the flow-control answer, that
// read data lands at the translated physical addresses, that write data is
// streamed out of the user buffer, that the request structure with its
// return status is written to the notification buffer before the
// notification is sent, and that a buffer on an unmapped page raises the
// exception interrupt.
module tb_uio_device;
  import uio_pkg::*;
  import tb_uio_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam addr_t CTX_TABLE = 32'h0010_0000;
  function automatic addr_t phys(ctx_t c, addr_t va);
    return va + 32'h0100_0000 + addr_t'(c) * 32'h0010_0000;
  endfunction

  logic bus_valid = 0, bus_resp_valid, bus_resp_full;
  line_t bus_data = '0;
  logic notif_valid, notif_ready = 1;
  line_t notif_line;
  logic mem_valid, mem_ready, mem_resp_valid;
  mem_req_t mem_req;
  line_t mem_rdata;
  logic net_tx_valid, net_tx_ready, net_rx_valid, net_rx_ready;
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
  int checks = 0, failures = 0, bad_order = 0;
  line_t notes[$];

  uio_device dut (.*, .ctx_table_base(CTX_TABLE));

  tb_mem_model #(.LATENCY(6), .CTX_TABLE(CTX_TABLE)) u_mem (
    .clk, .rst_n, .req_valid(mem_valid), .req(mem_req),
    .req_ready(mem_ready), .resp_valid(mem_resp_valid), .rdata(mem_rdata));

  tb_remote_dev #(.DELAY(20), .PHYS_OFF(32'h0110_0000)) u_rdev (
    .clk, .rst_n, .tx_valid(net_tx_valid), .tx_pkt(net_tx_pkt), .tx_ready(net_tx_ready),
    .rx_valid(net_rx_valid), .rx_pkt(net_rx_pkt), .rx_ready(net_rx_ready));

  // notifications: the user buffer must already hold the returned structure
  always @(posedge clk) if (notif_valid && notif_ready) begin
    uio_req_t r;
    r = unpack_req(notif_line);
    if (u_mem.get_line(phys(r.ctx, r.notif_buf)) != notif_line) bad_order++;
    notes.push_back(notif_line);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic burst(line_t l, output logic full);
    bus_valid = 1; bus_data = l;
    @(posedge clk); #1;
    bus_valid = 0;
    while (!bus_resp_valid) begin @(posedge clk); #1; end
    full = bus_resp_full;
  endtask

  logic f;
  int bad;
  initial begin
    for (int p = 0; p < 4; p++) u_mem.map_page(1, 20'h00400 + 20'(p), phys(1, 32'h0040_0000 + p * 4096) >> 12, 1);
    u_mem.map_page(1, 20'h00800, phys(1, 32'h0080_0000) >> 12, 1);
    u_mem.map_page(1, 20'h00500, phys(1, 32'h0050_0000) >> 12, 1);
    for (int off = 0; off < 128; off += 64)
      u_mem.write_line(phys(1, 32'h0050_0000 + off), mem_pattern(phys(1, 32'h0050_0000 + off)));
    repeat (2) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    burst(make_req(1, CMD_READ, 0, 32'h0040_0000, 4096 * 2, 32'h0080_0000, 32'h100, 64'h11, 1), f);
    check(!f, "read request accepted");
    burst(make_req(2, CMD_WRITE, 0, 32'h0050_0000, 128, 32'h0080_0040, 32'h104, 64'h12, 1), f);
    check(!f, "write request accepted");
    burst(make_req(3, CMD_READ, 0, 32'h0090_0000, 64, 32'h0080_0080, 32'h108, 64'h13, 1), f);
    check(!f, "third request accepted");
    for (int t = 0; t < 20000 && notes.size() < 3; t++) begin @(posedge clk); #1; end
    check(notes.size() == 3, "three notifications");
    bad = 0;
    for (int off = 0; off < 8192; off += 64)
      if (u_mem.get_line(phys(1, 32'h0040_0000 + off)) != data_pattern(1, 32'h0040_0000 + off)) bad++;
    check(bad == 0, $sformatf("two pages of read data in memory (%0d bad)", bad));
    check(u_rdev.data_in == 2 && u_rdev.data_err == 0, "write data streamed out");
    check(bad_order == 0, "structure in user buffer before notification");
    check(notes.size() > 0 && notes[0][RW_COMMAND*64 + 32 +: 32] == 32'h600D, "return status delivered");
    check(exc_irq && exc_ctx == 1 && exc_vaddr == 32'h0090_0000, "unmapped buffer raises exception");
    exc_ack = 1; @(posedge clk); #1; exc_ack = 0;
    check(!exc_irq, "exception acknowledged");
    check(tlb_misses >= 4 && tlb_hits > 100, $sformatf("TLB use (hits %0d misses %0d)", tlb_hits, tlb_misses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
