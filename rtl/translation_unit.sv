// translation_unit: virtual-to-physical translation service of the UIO
// device, combining the device TLB with the table walk engine.
//
// A DMA engine asks once per bus transaction (req_valid, req). The unit looks
// the page up in the TLB. On a hit it answers with the physical address, or
// with fault set if a write hits a read-only page. On a miss it starts the
// table walk engine; when the walk returns a page table entry the entry is
// written into the TLB and the lookup is restarted, so the answer always
// comes from the TLB. A walk that ends in a page fault is answered with
// fault set; the requester then reports it to the host through the
// conventional exception interrupt.
//
// Interface: req_ready pulses in the cycle the request is taken (only when
// idle); resp_valid pulses at the earliest two cycles later. One request is
// served at a time. hit_count and miss_count count lookups of the first try.
// inv_* invalidates TLB entries; prog_* rewrites the walk program.
//
// Following the original architecture: TLB lookup per bus transaction, hardware miss handling
// that fills the TLB and restarts the transaction, page faults passed to the
// host. The single-request-at-a-time service is this design's own choice.
module translation_unit
  import uio_pkg::*;
#(
  parameter int unsigned TLB_ENTRIES = 32,
  parameter int unsigned TLB_WAYS    = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  addr_t       ctx_table_base,
  // translation requests
  input  logic        req_valid,
  input  xlate_req_t  req,
  output logic        req_ready,
  output logic        resp_valid,
  output xlate_resp_t resp,
  // walker memory port
  output logic        mem_valid,
  output addr_t       mem_addr,
  input  logic        mem_ready,
  input  logic        mem_resp_valid,
  input  line_t       mem_rdata,
  // operating system side
  input  logic        inv_valid,
  input  ctx_t        inv_ctx,
  input  addr_t       inv_vaddr,
  input  logic        prog_we,
  input  logic [$clog2(TW_IMEM_DEPTH)-1:0] prog_addr,
  input  logic [31:0] prog_data,
  output logic [31:0] hit_count,
  output logic [31:0] miss_count
);
  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_WALK, S_RETRY, S_RELOOK} state_e;
  state_e     state;
  xlate_req_t cur;

  logic  lk_valid, lk_done, lk_hit, lk_fault;
  addr_t lk_paddr;
  xlate_req_t lk_req;
  logic  tw_start, tw_busy, tw_done, tw_fault;
  logic [31:0] tw_pte;

  assign req_ready = (state == S_IDLE) && req_valid;
  assign lk_valid  = req_ready || (state == S_RETRY);
  assign lk_req    = (state == S_IDLE) ? req : cur;
  assign tw_start  = (state == S_LOOKUP) && lk_done && !lk_hit;

  device_tlb #(.ENTRIES(TLB_ENTRIES), .WAYS(TLB_WAYS)) u_tlb (
    .clk, .rst_n,
    .lk_valid (lk_valid),
    .lk_ctx   (lk_req.ctx),
    .lk_vaddr (lk_req.vaddr),
    .lk_write (lk_req.write),
    .lk_done, .lk_hit, .lk_fault, .lk_paddr,
    .fill_valid(tw_done && !tw_fault),
    .fill_ctx  (cur.ctx),
    .fill_vaddr(cur.vaddr),
    .fill_pte  (tw_pte),
    .inv_valid, .inv_ctx, .inv_vaddr
  );

  table_walk_engine u_walk (
    .clk, .rst_n,
    .start(tw_start),
    .ctx  (cur.ctx),
    .vaddr(cur.vaddr),
    .ctx_table_base,
    .busy (tw_busy),
    .done (tw_done),
    .fault(tw_fault),
    .pte  (tw_pte),
    .mem_valid, .mem_addr, .mem_ready, .mem_resp_valid, .mem_rdata,
    .prog_we, .prog_addr, .prog_data
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cur        <= '0;
      resp_valid <= 1'b0;
      resp       <= '0;
      hit_count  <= '0;
      miss_count <= '0;
    end else begin
      resp_valid <= 1'b0;
      case (state)
        S_IDLE: if (req_ready) begin
          cur   <= req;
          state <= S_LOOKUP;
        end
        S_LOOKUP, S_RELOOK: if (lk_done) begin
          if (state == S_LOOKUP) begin
            if (lk_hit) hit_count  <= hit_count + 1'b1;
            else        miss_count <= miss_count + 1'b1;
          end
          if (lk_hit) begin
            resp_valid <= 1'b1;
            resp       <= '{fault: lk_fault, paddr: lk_paddr};
            state      <= S_IDLE;
          end else begin
            state <= S_WALK;   // the walk starts in this cycle (tw_start)
          end
        end
        S_WALK: if (tw_done) begin
          if (tw_fault) begin
            resp_valid <= 1'b1;
            resp       <= '{fault: 1'b1, paddr: '0};
            state      <= S_IDLE;
          end else begin
            state <= S_RETRY;
          end
        end
        S_RETRY: state <= S_RELOOK;
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) tw_start |-> !tw_busy)
    else $error("translation_unit: walk started while the engine is busy");
endmodule
