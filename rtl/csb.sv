// csb: conditional store buffer in the processor bus interface.
//
// The CSB lets user code hand a whole request structure to the I/O device in
// one atomic bus burst without a system call. Uncached "combining" stores
// land in a line-sized data buffer of eight 64-bit slots. Each store's line
// address is compared with the address saved from the previous store: on a
// match the data goes into its slot and the hit counter increments; on a
// mismatch the buffer is cleared, the counter set to one and the new store
// kept. A trap or external interrupt (clear) empties the buffer and zeroes
// the counter, so a process switch in the middle of a sequence is detected.
//
// A conditional flush carries an address and the hit count the program
// expects. If both match, the line is issued as one burst on the system bus
// (bus_valid for one cycle) with the last slot replaced by the hardwired
// process ID, and the flow-control status the device answers with
// (bus_resp_full) becomes the flush result: FLUSH_OK or FLUSH_FULL. If either
// differs, nothing is issued and the result is FLUSH_ABORT one cycle after
// the flush. Buffer and counter are cleared after every flush.
//
// Timing: a store takes one cycle. A flush answers FLUSH_ABORT in the next
// cycle, or FLUSH_OK/FLUSH_FULL in the cycle after the device's response;
// ready is low while a burst waits for its response, and the processor must
// hold stores and flushes until it rises.
//
// Following the original architecture: the address compare, hit counter, clear on traps and
// interrupts, line-sized burst, flow-control return value and the hardwired
// process ID in the last slot of the buffer. This design's own
// choices: 64-bit stores, line-address granularity of the compare, an 8-bit
// counter, a valid bit on the saved address, and the three-valued result.
module csb
  import uio_pkg::*;
#(
  parameter int unsigned SLOTS = LINE_WORDS,  // data buffer slots (one cache line)
  parameter int unsigned CNT_W = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // instructions from the CPU core
  input  logic          store_valid,
  input  addr_t         store_addr,
  input  word_t         store_data,
  input  logic          flush_valid,
  input  addr_t         flush_addr,
  input  logic [CNT_W-1:0] flush_count,
  output logic          ready,
  output logic          result_valid,
  output flush_result_e result,
  input  logic          clear,         // trap or external interrupt
  input  ctx_t          pid,           // privileged process ID register
  output logic [CNT_W-1:0] hit_count,
  // transaction to the system interface
  output logic          bus_valid,
  output addr_t         bus_addr,
  output line_t         bus_data,
  input  logic          bus_resp_valid,
  input  logic          bus_resp_full
);
  localparam int unsigned SW = $clog2(SLOTS);

  word_t                 data_buf [SLOTS];
  logic [ADDR_W-LINE_SHIFT-1:0] saved_line;
  logic                  saved_valid;
  logic                  waiting;

  wire [ADDR_W-LINE_SHIFT-1:0] st_line = store_addr[ADDR_W-1:LINE_SHIFT];
  wire [ADDR_W-LINE_SHIFT-1:0] fl_line = flush_addr[ADDR_W-1:LINE_SHIFT];
  wire [SW-1:0]                st_slot = store_addr[LINE_SHIFT-1:3];
  wire store_hit  = saved_valid && (st_line == saved_line);
  wire flush_hit  = saved_valid && (fl_line == saved_line) && (flush_count == hit_count);

  assign ready = !waiting;

  // Line as it would be issued now: buffer contents with the process ID in
  // the last slot.
  line_t cur_line;
  always_comb begin
    cur_line = '0;
    for (int unsigned s = 0; s < SLOTS; s++) cur_line[s*WORD_W +: WORD_W] = data_buf[s];
    cur_line[(SLOTS-1)*WORD_W +: WORD_W] = WORD_W'(pid);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < SLOTS; s++) data_buf[s] <= '0;
      saved_line   <= '0;
      saved_valid  <= 1'b0;
      hit_count    <= '0;
      waiting      <= 1'b0;
      bus_valid    <= 1'b0;
      bus_addr     <= '0;
      bus_data     <= '0;
      result_valid <= 1'b0;
      result       <= FLUSH_OK;
    end else begin
      bus_valid    <= 1'b0;
      result_valid <= 1'b0;
      if (waiting) begin
        if (bus_resp_valid) begin
          waiting      <= 1'b0;
          result_valid <= 1'b1;
          result       <= bus_resp_full ? FLUSH_FULL : FLUSH_OK;
        end
      end else if (clear) begin
        for (int unsigned s = 0; s < SLOTS; s++) data_buf[s] <= '0;
        saved_valid <= 1'b0;
        hit_count   <= '0;
      end else if (flush_valid) begin
        if (flush_hit) begin
          bus_valid <= 1'b1;
          bus_addr  <= {saved_line, {LINE_SHIFT{1'b0}}};
          bus_data  <= cur_line;
          waiting   <= 1'b1;
        end else begin
          result_valid <= 1'b1;
          result       <= FLUSH_ABORT;
        end
        for (int unsigned s = 0; s < SLOTS; s++) data_buf[s] <= '0;
        saved_valid <= 1'b0;
        hit_count   <= '0;
      end else if (store_valid) begin
        if (store_hit) begin
          data_buf[st_slot] <= store_data;
          hit_count         <= hit_count + 1'b1;
        end else begin
          for (int unsigned s = 0; s < SLOTS; s++)
            data_buf[s] <= (s == 32'(st_slot)) ? store_data : '0;
          saved_line  <= st_line;
          saved_valid <= 1'b1;
          hit_count   <= CNT_W'(1);
        end
      end
    end
  end

endmodule
