// tb_dma_engine: self-checking testbench of one DMA engine. A responder
// stands in for the translation unit (physical = virtual + 0x0100_0000,
// fault above 0xF000_0000, two-cycle answer), a behavioural memory for the
// system bus, and a sink with irregular ready for the network. Checks: a
// write job puts its line at the translated address; a three-line read job
// sends three data packets with the right context, virtual addresses and
// memory contents, with one translation per line; a faulting job reports
// the faulting context and address and stops.
module tb_dma_engine;
  import uio_pkg::*;
  import tb_uio_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam addr_t OFF = 32'h0100_0000;
  logic job_valid = 0, job_ready, done;
  dma_job_t job = '0;
  logic xl_valid, xl_ready, xl_resp_valid;
  xlate_req_t xl_req;
  xlate_resp_t xl_resp;
  logic mem_valid, mem_ready, mem_resp_valid;
  mem_req_t mem_req;
  line_t mem_rdata;
  logic out_valid, out_ready;
  net_pkt_t out_pkt;
  logic fault_evt, fault_notify;
  ctx_t fault_ctx;
  addr_t fault_vaddr;
  int checks = 0, failures = 0, xlates = 0, faults = 0;
  net_pkt_t got[$];

  dma_engine dut (.*);

  tb_mem_model #(.LATENCY(3)) u_mem (
    .clk, .rst_n, .req_valid(mem_valid), .req(mem_req),
    .req_ready(mem_ready), .resp_valid(mem_resp_valid), .rdata(mem_rdata));

  // translation responder
  logic xl_busy = 0;
  assign xl_ready = !xl_busy;
  always @(posedge clk) begin
    xl_resp_valid <= 0;
    if (xl_valid && !xl_busy) begin
      xl_busy <= 1;
      xlates++;
      xl_resp <= '{fault: (xl_req.vaddr >= 32'hF000_0000), paddr: xl_req.vaddr + OFF};
    end else if (xl_busy) begin
      xl_busy <= 0;
      xl_resp_valid <= 1;
    end
  end

  // network sink
  always @(posedge clk) begin
    out_ready <= ($urandom % 3) != 0;
    if (out_valid && out_ready) got.push_back(out_pkt);
    if (rst_n && fault_evt) faults++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(dma_job_t j);
    job_valid = 1; job = j;
    do @(negedge clk); while (!job_ready);  // taken at the next edge
    @(posedge clk); #1;
    job_valid = 0;
    while (!job_ready) begin @(posedge clk); #1; end
  endtask

  line_t l;
  initial begin
    xl_resp_valid = 0; xl_resp = '0; out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    // write one line
    l = data_pattern(7, 32'h0000_4040);
    run('{dir: DMA_TO_MEM, notify: 0, ctx: 7, vaddr: 32'h0000_4040, len: 64, data: l});
    check(u_mem.get_line(32'h0100_4040) == l, "line written at translated address");
    check(xlates == 1, "one translation per line");
    // read three lines
    for (int i = 0; i < 3; i++) u_mem.write_line(32'h0100_8000 + 64 * i, mem_pattern(32'h0100_8000 + 64 * i));
    xlates = 0;
    run('{dir: DMA_FROM_MEM, notify: 0, ctx: 9, vaddr: 32'h0000_8000, len: 192, data: '0});
    repeat (3) @(posedge clk);
    #1;
    check(got.size() == 3, "three data packets");
    check(xlates == 3, "three translations");
    foreach (got[i]) begin
      check(got[i].kind == PKT_DATA && got[i].ctx == 9 && got[i].vaddr == 32'h0000_8000 + 64 * i,
            "packet header");
      check(got[i].payload == mem_pattern(32'h0100_8000 + 64 * i), "packet data from memory");
    end
    // fault in the second line
    got.delete();
    run('{dir: DMA_FROM_MEM, notify: 1, ctx: 3, vaddr: 32'hEFFF_FFC0, len: 256, data: '0});
    repeat (3) @(posedge clk);
    #1;
    check(faults == 1, $sformatf("fault reported (%0d)", faults));
    check(fault_ctx == 3 && fault_vaddr == 32'hF000_0000 && fault_notify, "fault context and address");
    check(got.size() == 1, $sformatf("job stops at the fault (%0d)", got.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
