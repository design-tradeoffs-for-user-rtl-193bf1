// tb_request_queue: self-checking testbench of the device request queue.
// Sends CSB bursts, checks the flow-control answer one cycle later (taken
// while there is room, full once DEPTH requests wait), and the order and
// contents of the requests the transmit side drains.
module tb_request_queue;
  import uio_pkg::*;

  localparam int DEPTH = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic bus_valid = 0, bus_resp_valid, bus_resp_full, req_valid, req_pop = 0;
  line_t bus_data = '0, req_line;
  int checks = 0, failures = 0;

  request_queue #(.DEPTH(DEPTH)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic burst(line_t l, output logic full);
    bus_valid = 1; bus_data = l;
    @(posedge clk); #1;
    bus_valid = 0;
    check(bus_resp_valid, "answer one cycle after the burst");
    full = bus_resp_full;
  endtask

  logic f;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    check(!req_valid, "empty after reset");
    for (int i = 0; i < DEPTH; i++) begin
      burst(line_t'(100 + i), f);
      check(!f, "accepted while room");
    end
    burst(line_t'(999), f);
    check(f, "full status when queue full");
    for (int i = 0; i < DEPTH; i++) begin
      check(req_valid && req_line == line_t'(100 + i), "FIFO order");
      req_pop = 1; @(posedge clk); #1; req_pop = 0;
    end
    check(!req_valid, "drained; rejected burst not stored");
    burst(line_t'(7), f);
    check(!f && req_valid && req_line == line_t'(7), "accepted again after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
