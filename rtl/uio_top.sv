// uio_top: user-level I/O architecture, host processor side plus UIO
// network interface device.
//
// Applications start I/O without a system call: they write a request
// structure with uncached combining stores into the conditional store buffer
// (CSB) and issue a conditional flush, which moves the whole structure to
// the UIO device in one bus burst if no other process interfered, and
// returns the device's flow-control answer. The device forwards the request
// to the remote I/O device over the I/O network and moves buffer data
// directly between user memory and the network, translating virtual
// addresses with its own TLB and table walk engine. When the request comes
// back, the device writes it into the application's notification buffer
// and pushes it into the notification queue in the host bus interface,
// which raises the notification interrupt; the kernel reads the head of the
// queue through control registers and runs the application's handler.
//
// Ports: the CPU core side of the CSB (stores, conditional flush, clear on
// trap/interrupt, privileged process ID), the notification queue's
// interrupt, control registers and pop, the system memory port shared by
// the device's DMA engines and walk engine, the I/O network, and the
// operating system's controls of the device (context table base, TLB
// invalidation, walk program load, exception interrupt). Host processor,
// memory, network and remote devices are outside this module.
//
// The CSB burst goes straight to the device's request queue: the system
// bus is reduced to this one point-to-point path, and csb_burst_addr shows
// the address the burst was issued to.
module uio_top
  import uio_pkg::*;
#(
  parameter int unsigned REQ_DEPTH   = 8,
  parameter int unsigned NOTIF_DEPTH = 16,
  parameter int unsigned NUM_DMA     = 4,
  parameter int unsigned TLB_ENTRIES = 32,
  parameter int unsigned TLB_WAYS    = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  // CPU core: CSB instructions
  input  logic          store_valid,
  input  addr_t         store_addr,
  input  word_t         store_data,
  input  logic          flush_valid,
  input  addr_t         flush_addr,
  input  logic [7:0]    flush_count,
  output logic          csb_ready,
  output logic          flush_done,
  output flush_result_e flush_result,
  input  logic          trap_or_irq,
  input  ctx_t          pid,
  output addr_t         csb_burst_addr,
  // CPU core: notification queue
  output logic          notif_irq,
  input  logic [2:0]    nq_reg_addr,
  output word_t         nq_reg_rdata,
  input  logic          nq_pop,
  // system memory
  output logic          mem_valid,
  output mem_req_t      mem_req,
  input  logic          mem_ready,
  input  logic          mem_resp_valid,
  input  line_t         mem_rdata,
  // I/O network
  output logic          net_tx_valid,
  output net_pkt_t      net_tx_pkt,
  input  logic          net_tx_ready,
  input  logic          net_rx_valid,
  input  net_pkt_t      net_rx_pkt,
  output logic          net_rx_ready,
  // operating system controls of the device
  input  addr_t         ctx_table_base,
  input  logic          inv_valid,
  input  ctx_t          inv_ctx,
  input  addr_t         inv_vaddr,
  input  logic          prog_we,
  input  logic [$clog2(TW_IMEM_DEPTH)-1:0] prog_addr,
  input  logic [31:0]   prog_data,
  output logic          exc_irq,
  output ctx_t          exc_ctx,
  output addr_t         exc_vaddr,
  input  logic          exc_ack,
  // counters
  output logic [7:0]    csb_hits,
  output logic [31:0]   tlb_hits,
  output logic [31:0]   tlb_misses,
  output logic [31:0]   req_count,
  output logic [31:0]   data_count,
  output logic [31:0]   notif_count,
  output logic [31:0]   fault_count,
  output logic [31:0]   drop_count,
  output logic [31:0]   dma_jobs,
  output logic [NUM_DMA-1:0] dma_busy
);
  logic  bus_valid, bus_resp_valid, bus_resp_full;
  line_t bus_data;
  logic  notif_valid, notif_ready;
  line_t notif_line;

  csb u_csb (
    .clk, .rst_n,
    .store_valid, .store_addr, .store_data,
    .flush_valid, .flush_addr, .flush_count,
    .ready(csb_ready), .result_valid(flush_done), .result(flush_result),
    .clear(trap_or_irq), .pid, .hit_count(csb_hits),
    .bus_valid, .bus_addr(csb_burst_addr), .bus_data,
    .bus_resp_valid, .bus_resp_full
  );

  uio_device #(
    .REQ_DEPTH(REQ_DEPTH), .NUM_DMA(NUM_DMA),
    .TLB_ENTRIES(TLB_ENTRIES), .TLB_WAYS(TLB_WAYS)
  ) u_dev (
    .clk, .rst_n,
    .bus_valid, .bus_data, .bus_resp_valid, .bus_resp_full,
    .notif_valid, .notif_line, .notif_ready,
    .mem_valid, .mem_req, .mem_ready, .mem_resp_valid, .mem_rdata,
    .net_tx_valid, .net_tx_pkt, .net_tx_ready,
    .net_rx_valid, .net_rx_pkt, .net_rx_ready,
    .ctx_table_base, .inv_valid, .inv_ctx, .inv_vaddr,
    .prog_we, .prog_addr, .prog_data,
    .exc_irq, .exc_ctx, .exc_vaddr, .exc_ack,
    .tlb_hits, .tlb_misses, .req_count, .data_count, .notif_count,
    .fault_count, .drop_count, .dma_jobs, .dma_busy
  );

  notification_queue #(.DEPTH(NOTIF_DEPTH)) u_nq (
    .clk, .rst_n,
    .push_valid(notif_valid), .push_line(notif_line), .push_ready(notif_ready),
    .irq(notif_irq), .reg_addr(nq_reg_addr), .reg_rdata(nq_reg_rdata), .pop(nq_pop)
  );
endmodule
