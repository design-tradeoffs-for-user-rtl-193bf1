// dma_pool: the UIO device's set of concurrent DMA engines.
//
// NUM_ENGINES dma_engine instances work on independent jobs at the same
// time, so transfers of several outstanding requests overlap. A new job goes
// to the lowest-numbered idle engine. The engines share three ports, each
// with a round-robin arbiter: the translation unit, the system memory port
// and the network output. Translation and memory use req_arbiter (one
// transaction in flight per port); the network output picks among engines
// with a data packet ready, starting after the last one served.
//
// Interface: job_ready is high while some engine is idle; idle is high when
// no engine is busy. busy_mask shows which engines are working. fault_evt
// forwards an engine's translation fault (the lowest-numbered engine wins
// in the rare case of two in one cycle).
//
// Following the original architecture: four concurrent DMA engines sharing the
// device TLB. Dispatch and arbitration policies are this design's own.
module dma_pool
  import uio_pkg::*;
#(
  parameter int unsigned NUM_ENGINES = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        job_valid,
  input  dma_job_t    job,
  output logic        job_ready,
  output logic        idle,
  output logic [NUM_ENGINES-1:0] busy_mask,
  output logic        job_done,   // some engine finished a job this cycle
  // shared translation port
  output logic        xl_valid,
  output xlate_req_t  xl_req,
  input  logic        xl_ready,
  input  logic        xl_resp_valid,
  input  xlate_resp_t xl_resp,
  // shared memory port
  output logic        mem_valid,
  output mem_req_t    mem_req,
  input  logic        mem_ready,
  input  logic        mem_resp_valid,
  input  line_t       mem_rdata,
  // network output
  output logic        out_valid,
  output net_pkt_t    out_pkt,
  input  logic        out_ready,
  // fault report
  output logic        fault_evt,
  output logic        fault_notify,
  output ctx_t        fault_ctx,
  output addr_t       fault_vaddr
);
  localparam int unsigned N  = NUM_ENGINES;
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0]              e_job_valid, e_job_ready, e_done;
  logic [N-1:0]              e_xl_valid, e_xl_ready, e_xl_resp_valid;
  xlate_req_t [N-1:0]        e_xl_req;
  logic [N-1:0]              e_mem_valid, e_mem_ready, e_mem_resp_valid;
  mem_req_t [N-1:0]          e_mem_req;
  logic [N-1:0]              e_out_valid, e_out_ready;
  net_pkt_t [N-1:0]          e_out_pkt;
  logic [N-1:0]              e_fault_evt, e_fault_notify;
  ctx_t [N-1:0]              e_fault_ctx;
  addr_t [N-1:0]             e_fault_vaddr;
  xlate_resp_t               xl_resp_b;
  line_t                     mem_rdata_b;

  // job dispatch to the lowest idle engine
  always_comb begin
    logic taken;
    taken       = 1'b0;
    e_job_valid = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (!taken && e_job_ready[i]) begin
        taken          = 1'b1;
        e_job_valid[i] = job_valid;
      end
    end
  end
  assign job_ready = |e_job_ready;
  assign idle      = &e_job_ready;
  assign busy_mask = ~e_job_ready;
  assign job_done  = |e_done;

  for (genvar i = 0; i < N; i++) begin : g_eng
    dma_engine u_eng (
      .clk, .rst_n,
      .job_valid    (e_job_valid[i]),
      .job          (job),
      .job_ready    (e_job_ready[i]),
      .done         (e_done[i]),
      .xl_valid     (e_xl_valid[i]),
      .xl_req       (e_xl_req[i]),
      .xl_ready     (e_xl_ready[i]),
      .xl_resp_valid(e_xl_resp_valid[i]),
      .xl_resp      (xl_resp_b),
      .mem_valid    (e_mem_valid[i]),
      .mem_req      (e_mem_req[i]),
      .mem_ready    (e_mem_ready[i]),
      .mem_resp_valid(e_mem_resp_valid[i]),
      .mem_rdata    (mem_rdata_b),
      .out_valid    (e_out_valid[i]),
      .out_pkt      (e_out_pkt[i]),
      .out_ready    (e_out_ready[i]),
      .fault_evt    (e_fault_evt[i]),
      .fault_notify (e_fault_notify[i]),
      .fault_ctx    (e_fault_ctx[i]),
      .fault_vaddr  (e_fault_vaddr[i])
    );
  end

  req_arbiter #(.N(N), .REQ_W($bits(xlate_req_t)), .RESP_W($bits(xlate_resp_t))) u_xl_arb (
    .clk, .rst_n,
    .req_valid(e_xl_valid), .req_data(e_xl_req), .req_ready(e_xl_ready),
    .resp_valid(e_xl_resp_valid), .resp_data(xl_resp_b),
    .dn_valid(xl_valid), .dn_data(xl_req), .dn_ready(xl_ready),
    .dn_resp_valid(xl_resp_valid), .dn_resp_data(xl_resp)
  );

  req_arbiter #(.N(N), .REQ_W($bits(mem_req_t)), .RESP_W(LINE_W)) u_mem_arb (
    .clk, .rst_n,
    .req_valid(e_mem_valid), .req_data(e_mem_req), .req_ready(e_mem_ready),
    .resp_valid(e_mem_resp_valid), .resp_data(mem_rdata_b),
    .dn_valid(mem_valid), .dn_data(mem_req), .dn_ready(mem_ready),
    .dn_resp_valid(mem_resp_valid), .dn_resp_data(mem_rdata)
  );

  // network output: rotating priority among engines with a packet
  logic [IW-1:0] out_last, out_pick;
  logic          out_found;
  always_comb begin
    out_found = 1'b0;
    out_pick  = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (int'(out_last) + k) % N;
      if (!out_found && e_out_valid[idx]) begin
        out_found = 1'b1;
        out_pick  = IW'(idx);
      end
    end
  end
  always_comb begin
    e_out_ready = '0;
    if (out_found) e_out_ready[out_pick] = out_ready;
  end
  assign out_valid = out_found;
  assign out_pkt   = e_out_pkt[out_pick];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_last <= IW'(N - 1);
    else if (out_valid && out_ready) out_last <= out_pick;
  end

  // fault report
  always_comb begin
    fault_evt    = 1'b0;
    fault_notify = 1'b0;
    fault_ctx    = '0;
    fault_vaddr  = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (e_fault_evt[i]) begin
        fault_evt    = 1'b1;
        fault_notify = e_fault_notify[i];
        fault_ctx    = e_fault_ctx[i];
        fault_vaddr  = e_fault_vaddr[i];
      end
    end
  end
endmodule
