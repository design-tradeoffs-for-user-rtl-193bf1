// transmit_unit: sends queued requests from the UIO device to the I/O
// network.
//
// The unit takes the request structure at the head of the request queue and
// forwards it unchanged as a request packet; the device only passes the
// remote fields (capability, command, arguments) along and needs keep no
// copy, since the whole structure comes back on completion. If the command
// moves data from client memory to the remote device (CMD_WRITE bit) and the
// length is not zero, the unit then hands a DMA_FROM_MEM job for the user
// buffer to the DMA engines, which stream the buffer out as data packets.
//
// Interface: the head of the request queue (req_valid, req_line, and a
// one-cycle req_pop when it is taken), the network port (tx_valid, tx_pkt,
// tx_ready) and the DMA job port (job_valid, job, job_ready). req_count
// counts forwarded requests. One request per three cycles at best.
//
// Following the original architecture: request structures forwarded to the remote device,
// user buffer data moved by DMA. Packet format and command encoding are this
// design's own.
module transmit_unit
  import uio_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  input  line_t       req_line,
  output logic        req_pop,
  output logic        tx_valid,
  output net_pkt_t    tx_pkt,
  input  logic        tx_ready,
  output logic        job_valid,
  output dma_job_t    job,
  input  logic        job_ready,
  output logic [31:0] req_count
);
  typedef enum logic [1:0] {S_IDLE, S_SEND, S_JOB} state_e;
  state_e   state;
  line_t    line;
  uio_req_t r;

  assign r         = unpack_req(line);
  assign req_pop   = (state == S_IDLE) && req_valid;
  assign tx_valid  = (state == S_SEND);
  assign tx_pkt    = '{kind: PKT_REQUEST, ctx: r.ctx, vaddr: r.buf_addr, payload: line};
  assign job_valid = (state == S_JOB);
  assign job       = '{dir: DMA_FROM_MEM, notify: 1'b0, ctx: r.ctx, vaddr: r.buf_addr,
                       len: r.buf_len, data: '0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      line      <= '0;
      req_count <= '0;
    end else begin
      case (state)
        S_IDLE: if (req_valid) begin
          line  <= req_line;
          state <= S_SEND;
        end
        S_SEND: if (tx_ready) begin
          req_count <= req_count + 1'b1;
          state     <= ((r.command & CMD_WRITE) != 0 && r.buf_len != 0) ? S_JOB : S_IDLE;
        end
        S_JOB: if (job_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
