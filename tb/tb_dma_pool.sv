// tb_dma_pool: self-checking testbench of the pool of four DMA engines.
// Submits four four-line read jobs back to back, then eight one-line write
// jobs, against a translation responder (physical = virtual + 0x0100_0000),
// a behavioural memory and a network sink. Checks that all four engines
// were busy at once, that every data packet arrives once with the right
// contents, in address order per job and with the job's context, that
// every written line is in memory, that the pool reports idle at the end,
// and that a fault in one engine while others are busy is reported with its
// context, address and notify flag.
module tb_dma_pool;
  import uio_pkg::*;
  import tb_uio_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam addr_t OFF = 32'h0100_0000;
  logic job_valid = 0, job_ready, idle, job_done;
  logic [3:0] busy_mask;
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
  int checks = 0, failures = 0, max_busy = 0, done_jobs = 0;
  int seen [addr_t];
  addr_t last_va [ctx_t];
  int bad_order = 0, bad_ctx = 0, n_faults = 0;
  ctx_t f_ctx;
  addr_t f_va;
  logic f_notify;

  dma_pool dut (.*);

  tb_mem_model #(.LATENCY(6)) u_mem (
    .clk, .rst_n, .req_valid(mem_valid), .req(mem_req),
    .req_ready(mem_ready), .resp_valid(mem_resp_valid), .rdata(mem_rdata));

  logic xl_busy = 0;
  assign xl_ready = !xl_busy;
  always @(posedge clk) begin
    xl_resp_valid <= 0;
    if (xl_valid && !xl_busy) begin
      xl_busy <= 1;
      xl_resp <= '{fault: (xl_req.vaddr >= 32'hF000_0000), paddr: xl_req.vaddr + OFF};
    end else if (xl_busy) begin
      xl_busy <= 0;
      xl_resp_valid <= 1;
    end
  end

  always @(posedge clk) begin
    out_ready <= ($urandom % 4) != 0;
    if (out_valid && out_ready) begin
      if (out_pkt.payload != mem_pattern(out_pkt.vaddr + OFF)) begin
        failures++; $display("FAIL: data packet contents at %h", out_pkt.vaddr);
      end
      if (last_va.exists(out_pkt.ctx) && out_pkt.vaddr <= last_va[out_pkt.ctx]) bad_order++;
      last_va[out_pkt.ctx] = out_pkt.vaddr;
      if (out_pkt.ctx != ctx_t'((out_pkt.vaddr - 32'h1_0000) / 256)) bad_ctx++;
      seen[out_pkt.vaddr] = seen.exists(out_pkt.vaddr) ? seen[out_pkt.vaddr] + 1 : 1;
    end
    if ($countones(busy_mask) > max_busy) max_busy = $countones(busy_mask);
    if (job_done) done_jobs++;
    if (rst_n && fault_evt) begin
      n_faults++; f_ctx = fault_ctx; f_va = fault_vaddr; f_notify = fault_notify;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic submit(dma_job_t j);
    job_valid = 1; job = j;
    do @(negedge clk); while (!job_ready);
    @(posedge clk); #1;
    job_valid = 0;
  endtask

  int ok;
  initial begin
    xl_resp_valid = 0; xl_resp = '0; out_ready = 0;
    for (int i = 0; i < 16; i++) u_mem.write_line(OFF + 32'h1_0000 + 64 * i, mem_pattern(OFF + 32'h1_0000 + 64 * i));
    repeat (2) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    for (int e = 0; e < 4; e++)
      submit('{dir: DMA_FROM_MEM, notify: 0, ctx: ctx_t'(e), vaddr: 32'h1_0000 + 256 * e, len: 256, data: '0});
    for (int k = 0; k < 8; k++)
      submit('{dir: DMA_TO_MEM, notify: 0, ctx: 1, vaddr: 32'h2_0000 + 64 * k, len: 64,
               data: data_pattern(1, 32'h2_0000 + 64 * k)});
    while (!idle) begin @(posedge clk); #1; end
    repeat (2) @(posedge clk);
    #1;
    check(max_busy == 4, $sformatf("four engines busy at once (%0d)", max_busy));
    ok = 0;
    for (int i = 0; i < 16; i++) if (seen.exists(32'h1_0000 + 64 * i) && seen[32'h1_0000 + 64 * i] == 1) ok++;
    check(ok == 16 && seen.size() == 16, "each read line sent exactly once");
    ok = 0;
    for (int k = 0; k < 8; k++) if (u_mem.get_line(OFF + 32'h2_0000 + 64 * k) == data_pattern(1, 32'h2_0000 + 64 * k)) ok++;
    check(ok == 8, "all written lines in memory");
    check(done_jobs == 12, "twelve jobs completed");
    check(idle && job_ready, "pool idle at the end");
    check(bad_order == 0, "each job's lines leave in address order");
    check(bad_ctx == 0, "data packets carry their job's context");
    check(n_faults == 0, "no faults on mapped addresses");
    // a job that faults on its third line, in engine 2 while 0 and 1 are busy
    submit('{dir: DMA_FROM_MEM, notify: 0, ctx: 5, vaddr: 32'h1_0000, len: 1024, data: '0});
    submit('{dir: DMA_FROM_MEM, notify: 0, ctx: 6, vaddr: 32'h1_0000, len: 1024, data: '0});
    submit('{dir: DMA_TO_MEM, notify: 1, ctx: 9, vaddr: 32'hF000_0040, len: 64, data: '0});
    while (!idle) begin @(posedge clk); #1; end
    check(n_faults == 1 && f_ctx == 9 && f_va == 32'hF000_0040 && f_notify,
          $sformatf("fault from a busy pool reported with context and address (%0d %h %h)", n_faults, f_ctx, f_va));
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
