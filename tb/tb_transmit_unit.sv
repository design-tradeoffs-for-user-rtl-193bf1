// tb_transmit_unit: self-checking testbench of the transmit unit. Feeds a
// read request and a write request through a model of the request queue;
// checks that each goes out unchanged as a request packet with its context
// and buffer address, that only the write request starts a DMA job
// (from memory, for its buffer and length), and the request counter.
module tb_transmit_unit;
  import uio_pkg::*;
  import tb_uio_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_pop, tx_valid, tx_ready, job_valid, job_ready;
  line_t req_line;
  net_pkt_t tx_pkt;
  dma_job_t job;
  logic [31:0] req_count;
  int checks = 0, failures = 0;
  line_t q[$];
  net_pkt_t pkts[$];
  dma_job_t jobs[$];

  transmit_unit dut (.*);

  assign req_valid = q.size() > 0;
  assign req_line  = (q.size() > 0) ? q[0] : '0;
  // the queue model pops half a cycle after the edge that takes the head
  logic pop_pending = 0;
  always @(negedge clk) if (pop_pending) begin void'(q.pop_front()); pop_pending = 0; end
  always @(posedge clk) begin
    if (req_pop) pop_pending <= 1;
    tx_ready  <= ($urandom % 2) != 0;
    job_ready <= ($urandom % 3) == 0;
    if (tx_valid && tx_ready) pkts.push_back(tx_pkt);
    if (job_valid && job_ready) jobs.push_back(job);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  line_t rd, wr;
  initial begin
    tx_ready = 0; job_ready = 0;
    rd = make_req(64'hC1, CMD_READ, 64'h11, 32'h0004_0000, 16384, 32'h9000, 32'h4000, 64'h1, 16'd5);
    wr = make_req(64'hC2, CMD_WRITE, 64'h22, 32'h0005_0000, 512, 32'h9040, 32'h4004, 64'h2, 16'd6);
    repeat (2) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    q.push_back(rd);
    q.push_back(wr);
    repeat (100) @(posedge clk);
    #1;
    check(pkts.size() == 2, "two request packets");
    check(pkts[0].kind == PKT_REQUEST && pkts[0].payload == rd && pkts[0].ctx == 5 &&
          pkts[0].vaddr == 32'h0004_0000, "read request forwarded unchanged");
    check(pkts[1].kind == PKT_REQUEST && pkts[1].payload == wr && pkts[1].ctx == 6, "write request forwarded");
    check(jobs.size() == 1, "one DMA job, for the write");
    check(jobs[0].dir == DMA_FROM_MEM && jobs[0].ctx == 6 && jobs[0].vaddr == 32'h0005_0000 &&
          jobs[0].len == 512, "write job covers the buffer");
    check(req_count == 2, "request counter");
    check(q.size() == 0, "queue drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
