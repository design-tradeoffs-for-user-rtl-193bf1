// tb_mem_model: behavioural host memory for the UIO testbenches.
//
// Sparse line-addressed memory behind a request/response port: a request is
// taken when ready is high and answered LATENCY cycles later (resp_valid,
// rdata; writes are answered too). Unwritten lines read as zero. Tasks let a
// testbench write words and build page tables in the format the default
// walk program expects: a context table at CTX_TABLE (one root pointer per
// context), two-level tables of 1024 8-byte entries (8 KB each), entry bit 0 valid,
// bit 1 writable, bits [31:12] page frame.
module tb_mem_model
  import uio_pkg::*;
#(
  parameter int unsigned LATENCY   = 4,
  parameter logic [31:0] CTX_TABLE = 32'h0010_0000,
  parameter logic [31:0] PT_POOL   = 32'h0020_0000
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  input  mem_req_t req,
  output logic     req_ready,
  output logic     resp_valid,
  output line_t    rdata
);
  line_t       lines [logic [25:0]];
  logic        busy;
  int unsigned cnt;
  mem_req_t    cur;
  logic [31:0] next_pt;
  int unsigned reads, writes;

  assign req_ready = !busy;

  function automatic line_t get_line(addr_t a);
    logic [25:0] k;
    k = a[31:6];
    return lines.exists(k) ? lines[k] : '0;
  endfunction

  task automatic write_word(addr_t a, word_t d);
    line_t l;
    l = get_line(a);
    l[a[5:3]*64 +: 64] = d;
    lines[a[31:6]] = l;
  endtask

  function automatic word_t read_word(addr_t a);
    line_t l;
    l = get_line(a);
    return l[a[5:3]*64 +: 64];
  endfunction

  task automatic write_line(addr_t a, line_t l);
    lines[a[31:6]] = l;
  endtask

  // map virtual page vpn of context ctx to physical page ppn
  task automatic map_page(ctx_t ctx, logic [19:0] vpn, logic [19:0] ppn, logic writable);
    addr_t root, l1e_addr, l2;
    word_t l1e;
    root = addr_t'(read_word(CTX_TABLE + addr_t'(ctx) * 8));
    if (root == 0) begin
      root = next_pt;
      next_pt = next_pt + 32'h2000;
      write_word(CTX_TABLE + addr_t'(ctx) * 8, word_t'(root));
    end
    l1e_addr = root + addr_t'(vpn[19:10]) * 8;
    l1e = read_word(l1e_addr);
    if (l1e[0] == 1'b0) begin
      l2 = next_pt;
      next_pt = next_pt + 32'h2000;
      write_word(l1e_addr, word_t'({l2[31:1], 1'b1}));
    end else begin
      l2 = {l1e[31:12], 12'h0};
    end
    write_word(l2 + addr_t'(vpn[9:0]) * 8, word_t'({ppn, 10'h0, writable, 1'b1}));
  endtask

  task automatic unmap_page(ctx_t ctx, logic [19:0] vpn);
    addr_t root, l2;
    word_t l1e;
    root = addr_t'(read_word(CTX_TABLE + addr_t'(ctx) * 8));
    l1e  = read_word(root + addr_t'(vpn[19:10]) * 8);
    l2   = {l1e[31:12], 12'h0};
    write_word(l2 + addr_t'(vpn[9:0]) * 8, '0);
  endtask

  initial begin
    next_pt = PT_POOL;
    reads   = 0;
    writes  = 0;
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      cnt        <= 0;
      resp_valid <= 1'b0;
      rdata      <= '0;
      cur        <= '0;
    end else begin
      resp_valid <= 1'b0;
      if (!busy) begin
        if (req_valid) begin
          busy <= 1'b1;
          cur  <= req;
          cnt  <= LATENCY;
        end
      end else if (cnt > 1) begin
        cnt <= cnt - 1;
      end else begin
        busy       <= 1'b0;
        resp_valid <= 1'b1;
        if (cur.we) begin
          lines[cur.addr[31:6]] = cur.wdata;
          writes++;
          rdata <= '0;
        end else begin
          rdata <= get_line(cur.addr);
          reads++;
        end
      end
    end
  end
endmodule
