// tb_remote_dev: behavioural model of the remote I/O devices on the I/O
// network, for the UIO testbenches.
//
// Takes every packet the client sends (tx_ready always high). A read request
// (CMD_READ) is answered, DELAY cycles after it arrives, with one data packet
// per line of its buffer (data_pattern) and then a completion packet carrying
// the request structure with return status 0x600D. A write request
// (CMD_WRITE) is completed once all its data packets have arrived; each
// data line is compared with mem_pattern of the physical address given by
// the testbench's mapping function, here a fixed offset PHYS_OFF.
module tb_remote_dev
  import uio_pkg::*;
  import tb_uio_pkg::*;
#(
  parameter int unsigned DELAY    = 20,
  parameter logic [31:0] PHYS_OFF = 32'h0100_0000
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     tx_valid,
  input  net_pkt_t tx_pkt,
  output logic     tx_ready,
  output logic     rx_valid,
  output net_pkt_t rx_pkt,
  input  logic     rx_ready
);
  typedef struct {
    longint   due;
    net_pkt_t pkt;
  } sched_t;

  typedef struct {
    ctx_t  ctx;
    addr_t lo, hi;
    int    left;
    line_t req;
  } pending_t;

  sched_t   outq[$];
  pending_t pend[$];
  longint   now;
  int       requests, data_in, data_err, completions;

  assign tx_ready = 1'b1;
  assign rx_valid = (outq.size() > 0) && (outq[0].due <= now);
  assign rx_pkt   = (outq.size() > 0) ? outq[0].pkt : '0;

  function automatic line_t complete(line_t l);
    line_t r;
    r = l;
    r[RW_COMMAND*64 + 32 +: 32] = 32'h600D;
    return r;
  endfunction

  initial begin
    now = 0; requests = 0; data_in = 0; data_err = 0; completions = 0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      now = 0;
    end else begin
      now++;
      if (rx_valid && rx_ready) begin
        if (outq[0].pkt.kind == PKT_COMPLETION) completions++;
        void'(outq.pop_front());
      end
      if (tx_valid) begin
        if (tx_pkt.kind == PKT_REQUEST) begin
          uio_req_t r;
          longint   t;
          r = unpack_req(tx_pkt.payload);
          requests++;
          if ((r.command & CMD_READ) != 0) begin
            t = now + DELAY;
            if (outq.size() > 0 && outq[$].due > t) t = outq[$].due;
            for (int unsigned off = 0; off < r.buf_len; off += 64) begin
              sched_t s;
              s.due = t;
              s.pkt = '{kind: PKT_DATA, ctx: r.ctx, vaddr: r.buf_addr + off,
                        payload: data_pattern(r.ctx, r.buf_addr + off)};
              outq.push_back(s);
            end
            begin
              sched_t s;
              s.due = t;
              s.pkt = '{kind: PKT_COMPLETION, ctx: r.ctx, vaddr: r.notif_buf,
                        payload: complete(tx_pkt.payload)};
              outq.push_back(s);
            end
          end else begin
            pending_t p;
            p.ctx = r.ctx; p.lo = r.buf_addr; p.hi = r.buf_addr + r.buf_len;
            p.left = int'((r.buf_len + 63) / 64); p.req = tx_pkt.payload;
            pend.push_back(p);
          end
        end else if (tx_pkt.kind == PKT_DATA) begin
          data_in++;
          if (tx_pkt.payload != mem_pattern(tx_pkt.vaddr + PHYS_OFF)) data_err++;
          for (int i = 0; i < pend.size(); i++) begin
            if (pend[i].ctx == tx_pkt.ctx && tx_pkt.vaddr >= pend[i].lo &&
                tx_pkt.vaddr < pend[i].hi) begin
              pend[i].left--;
              if (pend[i].left == 0) begin
                sched_t s;
                s.due = now + DELAY;
                s.pkt = '{kind: PKT_COMPLETION, ctx: pend[i].ctx, vaddr: '0,
                          payload: complete(pend[i].req)};
                outq.push_back(s);
                pend.delete(i);
              end
              break;
            end
          end
        end
      end
    end
  end
endmodule
