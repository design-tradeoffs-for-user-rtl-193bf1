// tb_receive_unit: self-checking testbench of the receive unit. A pool
// model takes jobs and stays busy a few cycles per job. Checks: data
// packets become one-line write jobs with their context, address and data;
// a completion waits until the pool is idle, is written back to the
// notification buffer (a job marked notify), and only after that write has
// finished is sent to the notification queue, which may hold it back; a
// write-back that faults sends no notification and is counted as dropped.
module tb_receive_unit;
  import uio_pkg::*;
  import tb_uio_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rx_valid = 0, rx_ready, job_valid, job_ready, pool_idle, fault_evt, fault_notify;
  net_pkt_t rx_pkt = '0;
  dma_job_t job;
  logic notif_valid, notif_ready;
  line_t notif_line;
  logic [31:0] data_count, notif_count, drop_count;
  int checks = 0, failures = 0, busy_left = 0;
  logic fail_next_notify = 0;
  dma_job_t jobs[$];
  line_t notes[$];
  int wb_done_at = 0, notif_at = 0, cyc = 0;

  receive_unit dut (.*);

  assign job_ready = (busy_left == 0);
  assign pool_idle = (busy_left == 0);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    fault_evt <= 0; fault_notify <= 0;
    notif_ready <= ($urandom % 3) == 0;
    if (job_valid && job_ready) begin
      jobs.push_back(job);
      busy_left <= 5;
    end else if (busy_left > 0) begin
      busy_left <= busy_left - 1;
      if (busy_left == 1 && jobs.size() > 0 && jobs[$].notify) begin
        wb_done_at <= cyc;
        if (fail_next_notify) begin fault_evt <= 1; fault_notify <= 1; end
      end
    end
    if (notif_valid && notif_ready) begin
      notes.push_back(notif_line);
      notif_at <= cyc;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(net_pkt_t p);
    rx_valid = 1; rx_pkt = p;
    do @(negedge clk); while (!rx_ready);
    @(posedge clk); #1;
    rx_valid = 0;
  endtask

  line_t req;
  initial begin
    fault_evt = 0; fault_notify = 0; notif_ready = 0;
    req = make_req(64'hC1, CMD_READ, 0, 32'h0004_0000, 128, 32'h9000, 32'h4000, 64'h77, 16'd5);
    repeat (2) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    send('{kind: PKT_DATA, ctx: 5, vaddr: 32'h0004_0000, payload: data_pattern(5, 32'h0004_0000)});
    send('{kind: PKT_DATA, ctx: 5, vaddr: 32'h0004_0040, payload: data_pattern(5, 32'h0004_0040)});
    send('{kind: PKT_COMPLETION, ctx: 5, vaddr: 0, payload: req});
    repeat (60) @(posedge clk);
    #1;
    check(jobs.size() == 3, "two data jobs and one write-back");
    check(jobs[0].dir == DMA_TO_MEM && jobs[0].ctx == 5 && jobs[0].vaddr == 32'h0004_0000 &&
          jobs[0].data == data_pattern(5, 32'h0004_0000) && !jobs[0].notify, "data job 0");
    check(jobs[1].vaddr == 32'h0004_0040 && jobs[1].len == 64, "data job 1");
    check(jobs[2].notify && jobs[2].vaddr == 32'h9000 && jobs[2].ctx == 5 && jobs[2].data == req,
          "write-back to notification buffer");
    check(notes.size() == 1 && notes[0] == req, "notification sent with the request structure");
    check(notif_at > wb_done_at, "notification after the write-back finished");
    check(data_count == 2 && notif_count == 1, "counters");
    // faulting write-back
    fail_next_notify = 1;
    send('{kind: PKT_COMPLETION, ctx: 5, vaddr: 0, payload: req});
    repeat (40) @(posedge clk);
    #1;
    check(notes.size() == 1 && drop_count == 1, "faulting write-back sends no notification");
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
