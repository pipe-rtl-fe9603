// pipe_icache: per-processor instruction cache.
//
// PIPE gives each processor a pure instruction cache, read in one clock.
// Because instructions are 16 or 32 bits long and start on any 16-bit
// parcel, a lookup returns the parcels at PC and PC+1, which may lie in two
// different words and even two different lines; `hit` is set when the
// parcel at PC is present and, if its opcode says the instruction is 32
// bits long, the second parcel too. The read is combinational; the fetch
// stage registers the result.
//
// Organisation (this design's choice, the document gives no size): direct
// mapped, LINES lines of LINE_WORDS 32-bit words. A word address splits into
// tag | index | word offset. On a miss while `lookup` is set, the missing
// line is refilled from main memory: LINE_WORDS word reads go out through
// `req_*` (valid/ready) and the words come back in order on `fill_*`. The
// line becomes valid when its last word arrives. Stores never write the
// cache: the program is not allowed to modify itself.
//
// Lint: for an odd PC only the upper half of the second word is used, so
// the lower half of that read is unread.
module pipe_icache
  import pipe_pkg::*;
#(
  parameter int LINES      = 64,
  parameter int LINE_WORDS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        lookup,
  input  word_t       pc,
  output logic [15:0] parcel0,
  output logic [15:0] parcel1,
  output logic        hit,
  output logic        busy,
  output logic        req_valid,
  output word_t       req_addr,
  input  logic        req_ready,
  input  logic        fill_valid,
  input  word_t       fill_data
);
  localparam int OW = $clog2(LINE_WORDS);
  localparam int IW = $clog2(LINES);
  localparam int TW = XLEN - OW - IW;

  word_t          data  [LINES*LINE_WORDS];
  logic [TW-1:0]  tags  [LINES];
  logic           valid [LINES];

  word_t w0, w1, d0, d1;
  logic  hit0, hit1, need1;

  function automatic logic [IW-1:0] idx_of(word_t w);
    return w[OW+IW-1:OW];
  endfunction
  function automatic logic [TW-1:0] tag_of(word_t w);
    return w[XLEN-1:OW+IW];
  endfunction

  assign w0 = {1'b0, pc[XLEN-1:1]};
  assign w1 = w0 + 1'b1;
  assign d0 = data[w0[OW+IW-1:0]];
  assign d1 = data[w1[OW+IW-1:0]];
  assign hit0 = valid[idx_of(w0)] && (tags[idx_of(w0)] == tag_of(w0));
  assign hit1 = valid[idx_of(w1)] && (tags[idx_of(w1)] == tag_of(w1));

  always_comb begin
    if (!pc[0]) begin
      parcel0 = d0[31:16];
      parcel1 = d0[15:0];
    end else begin
      parcel0 = d0[15:0];
      parcel1 = d1[31:16];
    end
    need1 = op_is_long(parcel0[15:10]) && pc[0];
    hit   = hit0 && (!need1 || hit1);
  end

  // Refill engine.
  word_t          line_base;     // word address of the first word of the line
  logic [OW:0]    req_cnt, fill_cnt;

  assign req_valid = busy && (req_cnt != (OW+1)'(LINE_WORDS));
  assign req_addr  = line_base + word_t'(req_cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      req_cnt   <= '0;
      fill_cnt  <= '0;
      line_base <= '0;
      for (int i = 0; i < LINES; i++) valid[i] <= 1'b0;
    end else if (!busy) begin
      if (lookup && !hit) begin
        busy      <= 1'b1;
        req_cnt   <= '0;
        fill_cnt  <= '0;
        line_base <= (hit0 ? w1 : w0) & ~word_t'(LINE_WORDS - 1);
        valid[hit0 ? idx_of(w1) : idx_of(w0)] <= 1'b0;
      end
    end else begin
      if (req_valid && req_ready) req_cnt <= req_cnt + 1'b1;
      if (fill_valid) begin
        fill_cnt <= fill_cnt + 1'b1;
        if (fill_cnt == (OW+1)'(LINE_WORDS - 1)) begin
          busy                   <= 1'b0;
          valid[idx_of(line_base)] <= 1'b1;
          tags[idx_of(line_base)]  <= tag_of(line_base);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (busy && fill_valid)
      data[{idx_of(line_base), fill_cnt[OW-1:0]}] <= fill_data;
  end

  a_fill_expected: assert property (@(posedge clk) disable iff (!rst_n) fill_valid |-> busy);
endmodule
