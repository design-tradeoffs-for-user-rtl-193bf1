// req_arbiter: round-robin arbiter for a request/response port shared by N
// requesters, each with at most one transaction in flight.
//
// When the downstream port is free, the arbiter grants the first requester
// with req_valid set, searching from the one after the last winner, and
// forwards its request. The grant is held (the port is locked) until the
// downstream answers with resp_valid (at the earliest one cycle after it
// took the request); the response is then steered back to
// the owner and the port becomes free in the next cycle. Requests are
// accepted with a ready pulse in the cycle the downstream takes them.
// Used for the translation port and the memory port of the UIO device.
module req_arbiter #(
  parameter int unsigned N      = 2,
  parameter int unsigned REQ_W  = 8,
  parameter int unsigned RESP_W = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // requesters
  input  logic [N-1:0]             req_valid,
  input  logic [N-1:0][REQ_W-1:0]  req_data,
  output logic [N-1:0]             req_ready,
  output logic [N-1:0]             resp_valid,
  output logic [RESP_W-1:0]        resp_data,
  // shared downstream port
  output logic                     dn_valid,
  output logic [REQ_W-1:0]         dn_data,
  input  logic                     dn_ready,
  input  logic                     dn_resp_valid,
  input  logic [RESP_W-1:0]        dn_resp_data
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic          busy;      // a request has been issued, response pending
  logic [IW-1:0] owner;     // requester that owns the port
  logic [IW-1:0] last;      // last winner, for round robin
  logic          found;
  logic [IW-1:0] pick;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (int'(last) + k) % N;
      if (!found && req_valid[idx]) begin
        found = 1'b1;
        pick  = IW'(idx);
      end
    end
  end

  assign dn_valid  = !busy && found;
  assign dn_data   = req_data[pick];
  assign resp_data = dn_resp_data;

  always_comb begin
    req_ready  = '0;
    resp_valid = '0;
    if (dn_valid && dn_ready) req_ready[pick] = 1'b1;
    if (busy && dn_resp_valid) resp_valid[owner] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      owner <= '0;
      last  <= IW'(N - 1);
    end else if (!busy) begin
      if (dn_valid && dn_ready) begin
        busy  <= 1'b1;
        owner <= pick;
        last  <= pick;
      end
    end else if (dn_resp_valid) begin
      busy <= 1'b0;
    end
  end


  assert property (@(posedge clk) disable iff (!rst_n) dn_resp_valid |-> busy)
    else $error("req_arbiter: response with no request in flight");

endmodule
