// bypass_buffer: small write buffer with forwarding, one word per butterfly.
//
// At a stage boundary the last writes of one stage can need a bank that the
// first reads of the next stage use in the same cycle. Instead of stalling,
// the engine lets the reads have the banks and parks the colliding writes
// here. `req[w]` asks to park write port w's word; `fits` says, in the same
// cycle, whether all requested words can be taken: a word takes the entry
// that already holds an older copy of the same datapoint, otherwise a free
// entry. The engine raises `defer` only when `fits` is high, and the words are
// captured at the clock edge. While parked, a word is forwarded to reads of
// the same datapoint (`hit`, `hit_data`). An entry is dropped when a newer
// write of its datapoint reaches the banks (`wr_en`/`wr_addr`) or when the
// engine writes it back into an idle bank (`drain_en` with `drain_idx`).
// A parked datapoint is always rewritten in the next stage, so entries live
// only briefly. The size, one word per butterfly, follows the schedule's
// description of the buffer; allocation, forwarding and drain policy are this
// design's choices.
module bypass_buffer #(
  parameter int unsigned S     = 10,  // datapoint index width
  parameter int unsigned W     = 32,  // word width
  parameter int unsigned DEPTH = 1,   // entries (one per butterfly)
  parameter int unsigned NR    = 2,   // lookup ports
  parameter int unsigned NW    = 2,   // write ports that may be parked
  localparam int unsigned IW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req      [NW],
  input  logic          defer,
  input  logic          wr_en    [NW],
  input  logic [S-1:0]  wr_addr  [NW],
  input  logic [W-1:0]  wr_data  [NW],
  output logic          fits,
  input  logic          drain_en,
  input  logic [IW-1:0] drain_idx,
  input  logic [S-1:0]  rd_addr  [NR],
  output logic          hit      [NR],
  output logic [W-1:0]  hit_data [NR],
  output logic          valid    [DEPTH],
  output logic [S-1:0]  addr     [DEPTH],
  output logic [W-1:0]  data     [DEPTH]
);
  logic          has_tgt [NW];
  logic [IW-1:0] tgt     [NW];
  logic          taken   [DEPTH];
  logic          superseded [DEPTH];

  always_comb begin
    // entry for each parked word: its old copy, else the first free entry
    for (int e = 0; e < int'(DEPTH); e++) taken[e] = 1'b0;
    fits = 1'b1;
    for (int w = 0; w < int'(NW); w++) begin
      has_tgt[w] = 1'b0;
      tgt[w]     = '0;
      if (req[w]) begin
        for (int e = 0; e < int'(DEPTH); e++)
          if (!has_tgt[w] && valid[e] && addr[e] == wr_addr[w]) begin
            has_tgt[w] = 1'b1;
            tgt[w]     = IW'(e);
          end
        for (int e = 0; e < int'(DEPTH); e++)
          if (!has_tgt[w] && !valid[e] && !taken[e]) begin
            has_tgt[w] = 1'b1;
            tgt[w]     = IW'(e);
          end
        if (has_tgt[w]) taken[tgt[w]] = 1'b1;
        else            fits = 1'b0;
      end
    end

    for (int e = 0; e < int'(DEPTH); e++) begin
      superseded[e] = 1'b0;
      for (int w = 0; w < int'(NW); w++)
        if (wr_en[w] && wr_addr[w] == addr[e]) superseded[e] = 1'b1;
    end

    for (int r = 0; r < int'(NR); r++) begin
      hit[r]      = 1'b0;
      hit_data[r] = '0;
      for (int e = 0; e < int'(DEPTH); e++)
        if (valid[e] && addr[e] == rd_addr[r]) begin
          hit[r]      = 1'b1;
          hit_data[r] = data[e];
        end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int e = 0; e < int'(DEPTH); e++) begin
        valid[e] <= 1'b0;
        addr[e]  <= '0;
        data[e]  <= '0;
      end
    end else begin
      for (int e = 0; e < int'(DEPTH); e++)
        if (superseded[e] || (drain_en && drain_idx == IW'(e))) valid[e] <= 1'b0;
      if (defer)
        for (int w = 0; w < int'(NW); w++)
          if (req[w]) begin
            valid[tgt[w]] <= 1'b1;
            addr[tgt[w]]  <= wr_addr[w];
            data[tgt[w]]  <= wr_data[w];
          end
    end
  end

  // Words are parked only when they fit.
  always_ff @(posedge clk) begin
    if (rst_n) assert (!defer || fits) else $error("bypass buffer overflow");
  end
endmodule
