// uio_device: the user-level I/O network interface device.
//
// The device sits between the host system bus and the I/O network and keeps
// no per-connection or per-request state: everything it needs travels in
// the 64-byte request structure. Requests arrive from the host's conditional
// store buffer as single bursts into the request queue, which answers each
// burst with a flow-control status. The transmit unit forwards them to the
// network and starts DMA of outgoing buffer data. The receive unit writes
// returned data into user buffers, writes the returned request structure
// into the user's notification buffer, and then sends it to the host's
// notification queue. All user-space transfers go through the pool of DMA
// engines, whose virtual addresses are translated by the device TLB; TLB
// misses are resolved by the table walk engine from the host's own page
// tables. Translation faults are reported through the exception interrupt
// (exc_irq with the faulting context and address, cleared by exc_ack).
//
// Ports: the burst port from the CSB, the notification port to the host,
// one system memory port (line transactions, request/response) shared by
// the DMA engines and the walk engine, the network transmit and receive
// ports (one packet per transfer, valid/ready), and operating system controls:
// context table base for the walk program, TLB invalidation, walk program
// load. Counters are brought out for observation.
//
// Following the original architecture: the blocks and their connections, stateless
// forwarding, four DMA engines and a 32-entry 4-way TLB, hardware
// miss handling, page faults as conventional interrupts. Port protocols and
// arbitration are this design's own.
module uio_device
  import uio_pkg::*;
#(
  parameter int unsigned REQ_DEPTH   = 8,
  parameter int unsigned NUM_DMA     = 4,
  parameter int unsigned TLB_ENTRIES = 32,
  parameter int unsigned TLB_WAYS    = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // burst from the CSB
  input  logic        bus_valid,
  input  line_t       bus_data,
  output logic        bus_resp_valid,
  output logic        bus_resp_full,
  // notification to the host notification queue
  output logic        notif_valid,
  output line_t       notif_line,
  input  logic        notif_ready,
  // system memory port
  output logic        mem_valid,
  output mem_req_t    mem_req,
  input  logic        mem_ready,
  input  logic        mem_resp_valid,
  input  line_t       mem_rdata,
  // I/O network
  output logic        net_tx_valid,
  output net_pkt_t    net_tx_pkt,
  input  logic        net_tx_ready,
  input  logic        net_rx_valid,
  input  net_pkt_t    net_rx_pkt,
  output logic        net_rx_ready,
  // operating system controls
  input  addr_t       ctx_table_base,
  input  logic        inv_valid,
  input  ctx_t        inv_ctx,
  input  addr_t       inv_vaddr,
  input  logic        prog_we,
  input  logic [$clog2(TW_IMEM_DEPTH)-1:0] prog_addr,
  input  logic [31:0] prog_data,
  output logic        exc_irq,
  output ctx_t        exc_ctx,
  output addr_t       exc_vaddr,
  input  logic        exc_ack,
  // counters
  output logic [31:0] tlb_hits,
  output logic [31:0] tlb_misses,
  output logic [31:0] req_count,
  output logic [31:0] data_count,
  output logic [31:0] notif_count,
  output logic [31:0] fault_count,
  output logic [31:0] drop_count,
  output logic [31:0] dma_jobs,
  output logic [NUM_DMA-1:0] dma_busy
);
  // request queue -> transmit unit
  logic  rq_valid, rq_pop;
  line_t rq_line;

  request_queue #(.DEPTH(REQ_DEPTH)) u_rq (
    .clk, .rst_n,
    .bus_valid, .bus_data, .bus_resp_valid, .bus_resp_full,
    .req_valid(rq_valid), .req_line(rq_line), .req_pop(rq_pop)
  );

  logic     tu_tx_valid, tu_tx_ready;
  net_pkt_t tu_tx_pkt;
  logic     tu_job_valid, tu_job_ready;
  dma_job_t tu_job;

  transmit_unit u_tx (
    .clk, .rst_n,
    .req_valid(rq_valid), .req_line(rq_line), .req_pop(rq_pop),
    .tx_valid(tu_tx_valid), .tx_pkt(tu_tx_pkt), .tx_ready(tu_tx_ready),
    .job_valid(tu_job_valid), .job(tu_job), .job_ready(tu_job_ready),
    .req_count
  );

  logic     ru_job_valid, ru_job_ready;
  dma_job_t ru_job;
  logic     pool_idle, pool_job_ready, pool_job_done;
  logic     f_evt, f_notify;
  ctx_t     f_ctx;
  addr_t    f_vaddr;

  receive_unit u_rx (
    .clk, .rst_n,
    .rx_valid(net_rx_valid), .rx_pkt(net_rx_pkt), .rx_ready(net_rx_ready),
    .job_valid(ru_job_valid), .job(ru_job), .job_ready(ru_job_ready),
    .pool_idle, .fault_evt(f_evt), .fault_notify(f_notify),
    .notif_valid, .notif_line, .notif_ready,
    .data_count, .notif_count, .drop_count
  );

  // job sources: receive unit first (it frees the network), then transmit
  logic     pool_job_valid;
  dma_job_t pool_job;
  assign pool_job_valid = ru_job_valid || tu_job_valid;
  assign pool_job       = ru_job_valid ? ru_job : tu_job;
  assign ru_job_ready   = pool_job_ready;
  assign tu_job_ready   = pool_job_ready && !ru_job_valid;

  logic        xl_valid, xl_ready, xl_resp_valid;
  xlate_req_t  xl_req;
  xlate_resp_t xl_resp;
  logic        pm_valid, pm_ready, pm_resp_valid;
  mem_req_t    pm_req;
  logic        pd_valid, pd_ready;
  net_pkt_t    pd_pkt;

  dma_pool #(.NUM_ENGINES(NUM_DMA)) u_pool (
    .clk, .rst_n,
    .job_valid(pool_job_valid), .job(pool_job), .job_ready(pool_job_ready),
    .idle(pool_idle), .busy_mask(dma_busy), .job_done(pool_job_done),
    .xl_valid, .xl_req, .xl_ready, .xl_resp_valid, .xl_resp,
    .mem_valid(pm_valid), .mem_req(pm_req), .mem_ready(pm_ready),
    .mem_resp_valid(pm_resp_valid), .mem_rdata,
    .out_valid(pd_valid), .out_pkt(pd_pkt), .out_ready(pd_ready),
    .fault_evt(f_evt), .fault_notify(f_notify), .fault_ctx(f_ctx), .fault_vaddr(f_vaddr)
  );

  logic  tw_mem_valid, tw_mem_ready, tw_mem_resp_valid;
  addr_t tw_mem_addr;

  translation_unit #(.TLB_ENTRIES(TLB_ENTRIES), .TLB_WAYS(TLB_WAYS)) u_xlate (
    .clk, .rst_n, .ctx_table_base,
    .req_valid(xl_valid), .req(xl_req), .req_ready(xl_ready),
    .resp_valid(xl_resp_valid), .resp(xl_resp),
    .mem_valid(tw_mem_valid), .mem_addr(tw_mem_addr), .mem_ready(tw_mem_ready),
    .mem_resp_valid(tw_mem_resp_valid), .mem_rdata,
    .inv_valid, .inv_ctx, .inv_vaddr,
    .prog_we, .prog_addr, .prog_data,
    .hit_count(tlb_hits), .miss_count(tlb_misses)
  );

  // system memory port: walk engine (0) and DMA engines (1)
  logic [1:0]           m_valid, m_ready, m_resp_valid;
  mem_req_t [1:0]       m_req;
  line_t                m_rdata_unused;
  assign m_valid = {pm_valid, tw_mem_valid};
  assign m_req   = {pm_req, mem_req_t'{we: 1'b0, addr: tw_mem_addr, wdata: '0}};
  assign tw_mem_ready      = m_ready[0];
  assign pm_ready          = m_ready[1];
  assign tw_mem_resp_valid = m_resp_valid[0];
  assign pm_resp_valid     = m_resp_valid[1];

  req_arbiter #(.N(2), .REQ_W($bits(mem_req_t)), .RESP_W(LINE_W)) u_mem_arb (
    .clk, .rst_n,
    .req_valid(m_valid), .req_data(m_req), .req_ready(m_ready),
    .resp_valid(m_resp_valid), .resp_data(m_rdata_unused),
    .dn_valid(mem_valid), .dn_data(mem_req), .dn_ready(mem_ready),
    .dn_resp_valid(mem_resp_valid), .dn_resp_data(mem_rdata)
  );

  // network transmit: request packets and DMA data packets, alternating
  // priority when both wait
  logic last_was_data, pick_data;
  assign pick_data    = pd_valid && (!tu_tx_valid || !last_was_data);
  assign net_tx_valid = tu_tx_valid || pd_valid;
  assign net_tx_pkt   = pick_data ? pd_pkt : tu_tx_pkt;
  assign pd_ready     = pick_data && net_tx_ready;
  assign tu_tx_ready  = !pick_data && net_tx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_was_data <= 1'b0;
    else if (net_tx_valid && net_tx_ready) last_was_data <= pick_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dma_jobs <= '0;
    else if (pool_job_done) dma_jobs <= dma_jobs + 1'b1;
  end

  // exception interrupt: first unacknowledged translation fault
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      exc_irq     <= 1'b0;
      exc_ctx     <= '0;
      exc_vaddr   <= '0;
      fault_count <= '0;
    end else begin
      if (f_evt) fault_count <= fault_count + 1'b1;
      if (f_evt && (!exc_irq || exc_ack)) begin
        exc_irq   <= 1'b1;
        exc_ctx   <= f_ctx;
        exc_vaddr <= f_vaddr;
      end else if (exc_ack) begin
        exc_irq <= 1'b0;
      end
    end
  end
endmodule
