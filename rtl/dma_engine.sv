// dma_engine: one virtual-address DMA engine of the UIO device.
//
// An engine takes a job (context ID, virtual address, length, direction) and
// moves it one cache line per bus transaction. Before each transaction it
// has the line's virtual address translated, so user buffers need not be
// pinned or pre-registered. DMA_TO_MEM jobs write the line carried in the job
// (data returned by a remote device, or a returned request structure) to
// user memory. DMA_FROM_MEM jobs read each line of a user buffer and send it
// to the I/O network as a data packet tagged with context ID and virtual
// address. A translation fault ends the job: fault_evt pulses with the
// faulting context and address, which the device reports to the host as an
// exception interrupt.
//
// Interface: job_ready is high while idle; a job is taken when job_valid
// and job_ready are both high. The translation and memory ports are
// request/response ports (request held until ready, response in a later
// cycle); the network port is valid/ready. done pulses when the last line
// is finished. Per line: translation, one memory transaction, and for reads
// one network transfer.
//
// Following the original architecture: translation once per bus transaction, virtual
// addresses with context IDs, direct user-space transfers. Line-granular
// jobs (buffers line aligned, lengths rounded up to whole lines) are this
// design's own simplification.
module dma_engine
  import uio_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // job
  input  logic        job_valid,
  input  dma_job_t    job,
  output logic        job_ready,
  output logic        done,
  // translation port
  output logic        xl_valid,
  output xlate_req_t  xl_req,
  input  logic        xl_ready,
  input  logic        xl_resp_valid,
  input  xlate_resp_t xl_resp,
  // memory port
  output logic        mem_valid,
  output mem_req_t    mem_req,
  input  logic        mem_ready,
  input  logic        mem_resp_valid,
  input  line_t       mem_rdata,
  // network output (data packets)
  output logic        out_valid,
  output net_pkt_t    out_pkt,
  input  logic        out_ready,
  // fault report
  output logic        fault_evt,
  output logic        fault_notify,
  output ctx_t        fault_ctx,
  output addr_t       fault_vaddr
);
  typedef enum logic [2:0] {S_IDLE, S_XREQ, S_XWAIT, S_MREQ, S_MWAIT, S_SEND} state_e;
  state_e      state;
  dma_job_t    cur;
  logic [31:0] remaining;
  addr_t       paddr;
  line_t       rline;

  assign job_ready = (state == S_IDLE);
  assign xl_valid  = (state == S_XREQ);
  assign xl_req    = '{ctx: cur.ctx, vaddr: cur.vaddr, write: (cur.dir == DMA_TO_MEM)};
  assign mem_valid = (state == S_MREQ);
  assign mem_req   = '{we: (cur.dir == DMA_TO_MEM), addr: paddr, wdata: cur.data};
  assign out_valid = (state == S_SEND);
  assign out_pkt   = '{kind: PKT_DATA, ctx: cur.ctx, vaddr: cur.vaddr, payload: rline};

  // a line just finished: advance to the next one or end the job
  logic line_end, last_line;
  assign line_end  = (state == S_MWAIT && mem_resp_valid && cur.dir == DMA_TO_MEM) ||
                     (state == S_SEND && out_ready);
  assign last_line = (remaining <= LINE_BYTES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      cur          <= '0;
      remaining    <= '0;
      paddr        <= '0;
      rline        <= '0;
      done         <= 1'b0;
      fault_evt    <= 1'b0;
      fault_notify <= 1'b0;
      fault_ctx    <= '0;
      fault_vaddr  <= '0;
    end else begin
      done      <= 1'b0;
      fault_evt <= 1'b0;
      case (state)
        S_IDLE: if (job_valid) begin
          cur       <= job;
          cur.vaddr <= {job.vaddr[ADDR_W-1:LINE_SHIFT], {LINE_SHIFT{1'b0}}};
          remaining <= job.len;
          state     <= S_XREQ;
        end
        S_XREQ: if (xl_ready) state <= S_XWAIT;
        S_XWAIT: if (xl_resp_valid) begin
          if (xl_resp.fault) begin
            fault_evt    <= 1'b1;
            fault_notify <= cur.notify;
            fault_ctx    <= cur.ctx;
            fault_vaddr  <= cur.vaddr;
            state        <= S_IDLE;
          end else begin
            paddr <= xl_resp.paddr;
            state <= S_MREQ;
          end
        end
        S_MREQ: if (mem_ready) state <= S_MWAIT;
        S_MWAIT: if (mem_resp_valid) begin
          if (cur.dir == DMA_FROM_MEM) begin
            rline <= mem_rdata;
            state <= S_SEND;
          end
        end
        S_SEND: ;
        default: state <= S_IDLE;
      endcase
      if (line_end) begin
        if (last_line) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end else begin
          remaining <= remaining - LINE_BYTES;
          cur.vaddr <= cur.vaddr + LINE_BYTES;
          state     <= S_XREQ;
        end
      end
    end
  end
endmodule
