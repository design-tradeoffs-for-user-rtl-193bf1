// request_queue: request buffer at the system bus side of the UIO device.
//
// The conditional store buffer delivers a request structure as one
// line-sized burst (bus_valid). The queue stores it if it has room and
// answers one cycle later with bus_resp_valid and the flow-control status
// bus_resp_full: low means the request was taken, high means the queue was
// full and the request was dropped, so the application must retry. The
// transmit unit drains the queue from the head (req_valid, req_line,
// req_pop).
//
// Following the original architecture: a request queue in the device and the
// non-blocking flow-control answer to the burst. The depth is not given;
// 8 is this design's choice.
module request_queue
  import uio_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  // burst from the CSB
  input  logic  bus_valid,
  input  line_t bus_data,
  output logic  bus_resp_valid,
  output logic  bus_resp_full,
  // to the transmit unit
  output logic  req_valid,
  output line_t req_line,
  input  logic  req_pop
);
  logic full, empty;
  logic [$clog2(DEPTH+1)-1:0] count;

  sync_fifo #(.WIDTH(LINE_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push (bus_valid),
    .wdata(bus_data),
    .pop  (req_pop),
    .rdata(req_line),
    .full (full),
    .empty(empty),
    .count(count)
  );

  assign req_valid = !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_resp_valid <= 1'b0;
      bus_resp_full  <= 1'b0;
    end else begin
      bus_resp_valid <= bus_valid;
      bus_resp_full  <= bus_valid && full;
    end
  end
endmodule
