// receive_unit: handles traffic returning from remote I/O devices.
//
// Data packets (one line each, tagged with context ID and virtual address)
// become DMA_TO_MEM jobs that write the line straight into the user buffer.
// A completion packet carries the request structure back, return status
// filled in by the remote device. The unit waits until every DMA engine is
// idle, so all data of the request is in memory, then writes the structure
// to the request's notification buffer in user space (step 1 of the
// notification) and, once that write has finished, sends the same structure
// to the host's notification queue (step 2), which interrupts the processor.
// If the write-back faults, no notification is sent: the fault goes to the
// host as an exception interrupt instead.
//
// Interface: network input (rx_valid, rx_pkt, rx_ready), DMA job port,
// pool_idle and the pool's fault report, and the notification output
// (notif_valid, notif_line, notif_ready). Counters report data lines,
// notifications sent and notifications dropped after a fault.
//
// Following the original architecture: the returned request is written into the user's
// notification buffer before it is sent to the host notification queue
// and only requests completing without exception are notified.
// Draining the DMA engines before the write-back is this design's own way of
// keeping the notification behind the data.
module receive_unit
  import uio_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_valid,
  input  net_pkt_t    rx_pkt,
  output logic        rx_ready,
  output logic        job_valid,
  output dma_job_t    job,
  input  logic        job_ready,
  input  logic        pool_idle,
  input  logic        fault_evt,
  input  logic        fault_notify,
  output logic        notif_valid,
  output line_t       notif_line,
  input  logic        notif_ready,
  output logic [31:0] data_count,
  output logic [31:0] notif_count,
  output logic [31:0] drop_count
);
  typedef enum logic [2:0] {S_IDLE, S_DRAIN, S_WB, S_WB_WAIT, S_NOTIFY} state_e;
  state_e   state;
  line_t    line;
  uio_req_t r;
  logic     is_data;

  assign r          = unpack_req(line);
  assign is_data    = (rx_pkt.kind == PKT_DATA);
  assign notif_valid = (state == S_NOTIFY);
  assign notif_line  = line;

  always_comb begin
    rx_ready  = 1'b0;
    job_valid = 1'b0;
    job       = '{dir: DMA_TO_MEM, notify: 1'b0, ctx: rx_pkt.ctx, vaddr: rx_pkt.vaddr,
                  len: LINE_BYTES, data: rx_pkt.payload};
    if (state == S_IDLE && rx_valid) begin
      if (is_data) begin
        job_valid = 1'b1;
        rx_ready  = job_ready;
      end else begin
        rx_ready  = 1'b1;  // completion (or a stray request packet, dropped)
      end
    end else if (state == S_WB) begin
      job_valid = 1'b1;
      job       = '{dir: DMA_TO_MEM, notify: 1'b1, ctx: r.ctx, vaddr: r.notif_buf,
                    len: LINE_BYTES, data: line};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      line        <= '0;
      data_count  <= '0;
      notif_count <= '0;
      drop_count  <= '0;
    end else begin
      case (state)
        S_IDLE: if (rx_valid && rx_ready) begin
          if (is_data) data_count <= data_count + 1'b1;
          else if (rx_pkt.kind == PKT_COMPLETION) begin
            line  <= rx_pkt.payload;
            state <= S_DRAIN;
          end
        end
        S_DRAIN: if (pool_idle) state <= S_WB;
        S_WB: if (job_ready) state <= S_WB_WAIT;
        S_WB_WAIT: begin
          if (fault_evt && fault_notify) begin
            drop_count <= drop_count + 1'b1;
            state      <= S_IDLE;
          end else if (pool_idle) begin
            state <= S_NOTIFY;
          end
        end
        S_NOTIFY: if (notif_ready) begin
          notif_count <= notif_count + 1'b1;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
