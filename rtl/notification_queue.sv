// notification_queue: hardware queue of I/O completion notifications in the
// host processor bus interface.
//
// When a request completes, the UIO device sends the returned request
// structure to the host in one bus transaction (push_valid/push_line). The
// queue keeps, per notification, the target process ID, the notification
// buffer address, the notification handler address and the request argument.
// While the queue holds an entry the interrupt line is high, so the kernel's
// low-priority handler can read everything it needs from local control
// registers instead of issuing uncached reads to the device.
//
// Control registers (combinational read at reg_addr):
//   0 head process ID     1 head notification buffer
//   2 head handler        3 head request argument
//   4 number of entries
// A one-cycle pop pulse removes the head (the handler writes the pop
// register when it is done with the entry). push_ready is low while full:
// the device then holds its notification.
//
// Following the original architecture: the entry contents, the head-of-queue control
// registers and raising the interrupt. The depth is not given; 16 covers one
// notification from each of the 16 concurrent requests of the evaluated
// workload. Register numbering and the pop register are this design's own.
module notification_queue
  import uio_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // from the UIO device
  input  logic        push_valid,
  input  line_t       push_line,
  output logic        push_ready,
  // to the processor
  output logic        irq,
  input  logic [2:0]  reg_addr,
  output word_t       reg_rdata,
  input  logic        pop
);
  typedef struct packed {
    ctx_t  pid;
    addr_t notif_buf;
    addr_t handler;
    word_t req_arg;
  } notif_t;

  notif_t   in_entry, head;
  uio_req_t r;
  logic     full, empty;
  logic [$clog2(DEPTH+1)-1:0] count;

  always_comb begin
    r                  = unpack_req(push_line);
    in_entry.pid       = r.ctx;
    in_entry.notif_buf = r.notif_buf;
    in_entry.handler   = r.handler;
    in_entry.req_arg   = r.req_arg;
  end

  sync_fifo #(.WIDTH($bits(notif_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push (push_valid),
    .wdata(in_entry),
    .pop  (pop),
    .rdata(head),
    .full (full),
    .empty(empty),
    .count(count)
  );

  assign push_ready = !full;
  assign irq        = !empty;

  always_comb begin
    case (reg_addr)
      3'd0:    reg_rdata = empty ? '0 : WORD_W'(head.pid);
      3'd1:    reg_rdata = empty ? '0 : WORD_W'(head.notif_buf);
      3'd2:    reg_rdata = empty ? '0 : WORD_W'(head.handler);
      3'd3:    reg_rdata = empty ? '0 : head.req_arg;
      3'd4:    reg_rdata = WORD_W'(count);
      default: reg_rdata = '0;
    endcase
  end
endmodule
