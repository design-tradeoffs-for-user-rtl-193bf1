// tb_notification_queue: self-checking testbench of the host notification
// queue. Pushes returned request structures, checks the interrupt line,
// the head-of-queue control registers and entry count, first-in first-out
// order through pops, and that a full queue refuses further notifications.
module tb_notification_queue;
  import uio_pkg::*;
  import tb_uio_pkg::*;

  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push_valid = 0, push_ready, irq, pop = 0;
  line_t push_line = '0;
  logic [2:0] reg_addr = 0;
  word_t reg_rdata;
  int checks = 0, failures = 0;

  notification_queue #(.DEPTH(DEPTH)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic line_t req_n(int n);
    return make_req(64'hCAFE, CMD_READ, 0, 32'h1000 * n, 4096, 32'h8000 + 64 * n,
                    32'h4000_0000 + n, 64'hA000 + n, ctx_t'(n + 1));
  endfunction

  task automatic push(line_t l);
    push_valid = 1; push_line = l;
    @(posedge clk); #1;
    push_valid = 0;
  endtask


  task automatic read_reg(int a, output word_t v);
    reg_addr = 3'(a); #1; v = reg_rdata;
  endtask

  word_t v;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    check(!irq, "no interrupt when empty");
    read_reg(4, v); check(v == 0, "count 0");
    for (int n = 0; n < DEPTH; n++) begin
      check(push_ready, "ready while not full");
      push(req_n(n));
      check(irq, "interrupt raised");
    end
    read_reg(4, v); check(v == DEPTH, "count = depth");
    check(!push_ready, "full queue refuses push");
    push(req_n(9));  // dropped
    for (int n = 0; n < DEPTH; n++) begin
      read_reg(0, v); check(v == 64'(n + 1), $sformatf("head pid %0d", n));
      read_reg(1, v); check(v == 64'(32'h8000 + 64 * n), "head notification buffer");
      read_reg(2, v); check(v == 64'(32'h4000_0000 + n), "head handler");
      read_reg(3, v); check(v == 64'hA000 + n, "head request argument");
      pop = 1; @(posedge clk); #1; pop = 0;
    end
    check(!irq, "interrupt drops when drained");
    // simultaneous push and pop
    push(req_n(5));
    push_valid = 1; push_line = req_n(6); pop = 1;
    @(posedge clk); #1; push_valid = 0; pop = 0;
    read_reg(4, v); check(v == 1, "push and pop in the same cycle");
    read_reg(0, v); check(v == 7, "order kept after push and pop");
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
