// tb_csb: self-checking testbench of the conditional store buffer.
//
// Drives combining-store sequences and conditional flushes and plays the
// device's flow-control answer. Checks: a full sequence is issued as one
// burst with the process ID in the last slot and returns FLUSH_OK; a
// device that is full gives FLUSH_FULL; a wrong expected count, a wrong
// flush address, a trap in the middle of a sequence and a store to another
// line all give FLUSH_ABORT with no burst; hit counter values; and the
// result latencies (abort one cycle after the flush, success one cycle after
// the device's answer).
module tb_csb;
  import uio_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic store_valid, flush_valid, ready, result_valid, clear;
  addr_t store_addr, flush_addr, bus_addr;
  word_t store_data;
  logic [7:0] flush_count, hit_count;
  flush_result_e result;
  ctx_t pid;
  logic bus_valid, bus_resp_valid, bus_resp_full;
  line_t bus_data;

  int checks = 0, failures = 0, bursts = 0;
  line_t last_burst;
  addr_t last_addr;
  logic dev_full = 0;
  int   dev_delay = 3;

  csb dut (.*, .ready(ready), .result_valid(result_valid), .result(result));

  // device: answer each burst dev_delay cycles later
  initial begin
    bus_resp_valid = 0; bus_resp_full = 0;
    forever begin
      @(posedge clk);
      if (bus_valid) begin
        bursts++;
        last_burst = bus_data;
        last_addr  = bus_addr;
        repeat (dev_delay - 1) @(posedge clk);
        bus_resp_valid <= 1; bus_resp_full <= dev_full;
        @(posedge clk);
        bus_resp_valid <= 0; bus_resp_full <= 0;
      end
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_store(addr_t a, word_t d);
    store_valid = 1; store_addr = a; store_data = d;
    @(posedge clk); #1;
    store_valid = 0;
  endtask

  // issue a flush, return result and cycles from the flush to the result
  task automatic do_flush(addr_t a, logic [7:0] n, output flush_result_e r, output int cyc);
    flush_valid = 1; flush_addr = a; flush_count = n;
    @(posedge clk); #1;
    flush_valid = 0;
    cyc = 1;
    while (!result_valid) begin @(posedge clk); #1; cyc++; end
    r = result;
    @(posedge clk); #1;
    while (!ready) begin @(posedge clk); #1; end
  endtask

  flush_result_e r;
  int cyc, b0;
  addr_t base;

  initial begin
    store_valid = 0; flush_valid = 0; clear = 0; pid = 16'h0042;
    store_addr = 0; store_data = 0; flush_addr = 0; flush_count = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // 1. seven argument stores + flush -> one burst, OK
    base = 32'hF000_0040;
    for (int i = 0; i < 7; i++) do_store(base + 8 * i, 64'h1000 + i);
        check(hit_count == 7, $sformatf("hit counter counts 7 stores (%0d)", hit_count));
    b0 = bursts;
    do_flush(base, 7, r, cyc);
    check(r == FLUSH_OK, "complete sequence flushes OK");
    check(bursts == b0 + 1, "exactly one burst issued");
    check(last_addr == base, "burst address");
    for (int i = 0; i < 7; i++) check(last_burst[i*64 +: 64] == 64'h1000 + i, "burst slot data");
    check(last_burst[7*64 +: 64] == 64'h42, "hardwired process ID in last slot");
    check(cyc == 1 + dev_delay + 1, "success result one cycle after device answer");
        check(hit_count == 0, "counter cleared after flush");

    // 2. device full -> FLUSH_FULL
    dev_full = 1;
    for (int i = 0; i < 7; i++) do_store(base + 8 * i, 64'h2000 + i);
    do_flush(base, 7, r, cyc);
    check(r == FLUSH_FULL, "flow control: device full");
    dev_full = 0;

    // 3. wrong expected count -> abort, no burst
    b0 = bursts;
    for (int i = 0; i < 7; i++) do_store(base + 8 * i, 64'h3000 + i);
    do_flush(base, 6, r, cyc);
    check(r == FLUSH_ABORT, "count mismatch aborts");
    check(cyc == 1, "abort result in the next cycle");
    repeat (5) @(posedge clk);
    check(bursts == b0, "no burst after abort");

    // 4. wrong flush address -> abort
    for (int i = 0; i < 7; i++) do_store(base + 8 * i, 64'h4000 + i);
    do_flush(base + 64, 7, r, cyc);
    check(r == FLUSH_ABORT, "address mismatch aborts");

    // 5. trap in the middle of the sequence -> abort
    for (int i = 0; i < 3; i++) do_store(base + 8 * i, 64'h5000 + i);
    clear = 1; @(posedge clk); #1; clear = 0;
        check(hit_count == 0, "trap zeroes the hit counter");
    for (int i = 3; i < 7; i++) do_store(base + 8 * i, 64'h5000 + i);
        check(hit_count == 4, "stores after trap counted from zero");
    do_flush(base, 7, r, cyc);
    check(r == FLUSH_ABORT, "interrupted sequence aborts");

    // 6. another process stores to a different line: buffer restarts at 1
    for (int i = 0; i < 4; i++) do_store(base + 8 * i, 64'h6000 + i);
    do_store(32'hF000_0080, 64'hBAD);
        check(hit_count == 1, "store to other line restarts counter at one");
    for (int i = 4; i < 7; i++) do_store(base + 8 * i, 64'h6000 + i);
    do_flush(base, 7, r, cyc);
    check(r == FLUSH_ABORT, "conflicting sequence aborts");

    // 7. retry succeeds and carries the retried data only
    for (int i = 0; i < 7; i++) do_store(base + 8 * i, 64'h7000 + i);
    do_flush(base, 7, r, cyc);
    check(r == FLUSH_OK, "retry succeeds");
    check(last_burst[0 +: 64] == 64'h7000 && last_burst[6*64 +: 64] == 64'h7006, "retried data");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
