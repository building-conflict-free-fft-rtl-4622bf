// cfs_fft: in-place radix-2 or radix-4 FFT engine on single-ported memory
// banks, driven by a conflict-free schedule.
//
// D complex samples live in G single-ported banks (bank_array). Every cycle
// the engine reads the R*B operands of one operation (B butterflies of radix
// R), computes the butterflies with twiddles from per-butterfly ROMs (R-1 per
// butterfly), and sends
// the results down a P-deep read-process/write pipeline: read and process in
// the first cycle, P-2 more register stages, write back in place in the last.
// With OVERLAP=1 a new operation is read every cycle while older results are
// written, so one cycle touches a window of up to RBP consecutive schedule
// positions; the schedule (addr_gen) guarantees that any G consecutive
// positions of a stage sit in G distinct banks, with G the smallest power of
// two >= RBP. With OVERLAP=0 an operation is read only when the pipeline is
// empty, and G >= RB is enough. A radix-4 operation does radix-2 stages s and
// s+1 together (see addr_gen and butterfly_r4), so it gives the same results
// as the radix-2 engine in half the operations; it needs an even log2_len.
//
// Only where a window straddles two stages can a write and a read need the
// same bank. If BYPASS=1 and the colliding writes fit, they are parked in a
// bypass_buffer of R*B/2 words (and forwarded to reads of the same
// datapoint) and the read goes ahead; otherwise the engine stalls the read for
// one cycle and lets the writes finish. A read of a datapoint that is still in
// the pipeline also stalls (a guard only; no simulated configuration needed
// it). Parked words are written back through an extra write port when their
// bank is idle, or dropped when a newer write of the datapoint lands.
//
// Host side: while not busy, host_addr reads (asynchronously, host_rdata) and
// host_we writes the datapoint host_addr. Samples are {re, im}, W bits each,
// two's complement. For a DFT, load sample x[n] into datapoint bitrev(n); after
// `done`, datapoint k holds X[k]/D (every stage halves). `start` (one cycle,
// while idle) runs one transform; `busy` is high until the one-cycle `done`.
// `log2_len`, sampled with `start`, selects the transform length 2^log2_len
// (from T, and at least RB, up to S): a shorter transform uses datapoints
// 0..2^log2_len-1 on the same banks and schedule logic, with the upper
// datapoint bits zero; load x[n] into bitrev over log2_len bits.
// `cycles` is the length of the last transform, from the first read to the last
// bank write; `stalls` counts lost issue cycles, `bypasses` parked writes.
//
// The schedule, the bank map, the group-size rule, the pipeline shapes and
// the bypass buffer follow the schedule's description; the host port, number
// format, conflict arbitration, the buffer size for radix 4 and the way
// radix 4 rides on the radix-2 schedule are this design's.
//
// Lint notes: bank_map's `row` and reorder_unit's `bank` outputs are left
// open where only the other output is needed; addr_gen's `stage` and `op`
// outputs are not used by the engine (they serve observation). Unused upper
// bits inside butterfly_r2 (also when used inside butterfly_r4) and schedule_gen are the discarded parts of
// products and double-width rotations.
module cfs_fft
  import cfs_pkg::*;
#(
  parameter int unsigned D       = 1024,
  parameter int unsigned B       = 1,
  parameter int unsigned R       = 2,
  parameter int unsigned P       = 2,
  parameter bit          OVERLAP = 1'b1,
  parameter bit          BYPASS  = 1'b1,
  parameter int unsigned W       = 16,
  parameter int unsigned TW      = 16,
  localparam int unsigned S  = $clog2(D),
  localparam int unsigned G  = group_size(B, R, P, OVERLAP),
  localparam int unsigned T  = $clog2(G),
  localparam int unsigned NP = R * B,        // operands per operation
  localparam int unsigned NW = NP + 1,      // write ports: results + drain
  localparam int unsigned LW = $clog2(S + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [LW-1:0]    log2_len,
  output logic             busy,
  output logic             done,
  input  logic             host_we,
  input  logic [S-1:0]     host_addr,
  input  logic [2*W-1:0]   host_wdata,
  output logic [2*W-1:0]   host_rdata,
  output logic [31:0]      cycles,
  output logic [31:0]      stalls,
  output logic [31:0]      bypasses
);
  localparam int unsigned SW = (S > 1) ? $clog2(S) : 1;
  localparam int unsigned OW = (D / (R * B) > 1) ? $clog2(D / (R * B)) : 1;

  state_t state_q;

  // ---------------------------------------------------------------- schedule
  logic          ag_valid, ag_last;
  logic [SW-1:0] ag_stage;
  logic [OW-1:0] ag_op;
  logic [S-1:0]  rd_addr [NP];   // read operand n: input n mod R of butterfly n / R
  logic [S-2:0]  ag_tw  [B][R-1];
  logic          issue;

  addr_gen #(.D(D), .B(B), .G(G), .R(R)) u_agen (
    .clk, .rst_n,
    .start  (start && state_q == ST_IDLE),
    .len    (log2_len),
    .advance(issue),
    .valid  (ag_valid),
    .last   (ag_last),
    .stage  (ag_stage),
    .op     (ag_op),
    .dp     (rd_addr),
    .tw     (ag_tw)
  );

  // ---------------------------------------------------------------- pipeline
  // Entry 0 holds results just computed; entry P-2 is written to the banks.
  logic           pv [P-1];
  logic [S-1:0]   pa [P-1][NP];
  logic [2*W-1:0] pd [P-1][NP];

  logic         wr_valid;
  logic [S-1:0] wr_addr_p [NP];
  logic [2*W-1:0] wr_data_p [NP];
  assign wr_valid = pv[P-2];
  for (genvar n = 0; n < int'(NP); n++) begin : g_wr
    assign wr_addr_p[n] = pa[P-2][n];
    assign wr_data_p[n] = pd[P-2][n];
  end

  // ---------------------------------------------------------------- conflicts
  logic [T-1:0] rbank [NP];
  logic [T-1:0] wbank [NP];
  for (genvar n = 0; n < int'(NP); n++) begin : g_bmap
    bank_map #(.S(S), .T(T)) u_rmap (.d(rd_addr[n]),   .bank(rbank[n]), .row());
    bank_map #(.S(S), .T(T)) u_wmap (.d(wr_addr_p[n]), .bank(wbank[n]), .row());
  end

  localparam int unsigned BD = NP / 2;       // bypass words: one per radix-2 pair
  localparam int unsigned IW = (BD > 1) ? $clog2(BD) : 1;
  logic           buf_valid [BD];
  logic [S-1:0]   buf_addr  [BD];
  logic [2*W-1:0] buf_data  [BD];
  logic [T-1:0]   buf_bank  [BD];
  logic           buf_fits;
  for (genvar e = 0; e < int'(BD); e++) begin : g_bufmap
    bank_map #(.S(S), .T(T)) u_map (.d(buf_addr[e]), .bank(buf_bank[e]), .row());
  end

  logic          want_issue;     // an operation is ready to be read
  logic          pipe_busy;      // some result is still in flight
  logic          hazard;         // a read needs a datapoint not yet written
  logic [NP-1:0] wconf;          // write n collides with a read
  int unsigned   nconf;
  logic          can_defer, defer, stall;
  logic          wr_en_b [NW];
  logic [S-1:0]  wr_addr_b [NW];
  logic [2*W-1:0] wr_data_b [NW];
  logic          rd_en_b [NP];
  logic          drain;
  logic [IW-1:0] drain_idx;
  logic          wreq [NP];
  logic [G-1:0]  bank_used;

  // Writes that would meet a read in the same bank this cycle.
  always_comb begin
    wconf = '0;
    nconf = 0;
    for (int w = 0; w < int'(NP); w++) begin
      for (int n = 0; n < int'(NP); n++)
        if (wr_valid && wbank[w] == rbank[n]) wconf[w] = 1'b1;
      wreq[w] = wconf[w];
      if (wconf[w]) nconf = nconf + 1;
    end
  end

  always_comb begin
    pipe_busy = 1'b0;
    for (int k = 0; k < int'(P) - 1; k++) pipe_busy |= pv[k];

    want_issue = rst_n && state_q == ST_RUN && ag_valid && (OVERLAP || !pipe_busy);

    hazard = 1'b0;
    for (int k = 0; k < int'(P) - 2; k++)
      for (int a = 0; a < int'(NP); a++)
        for (int n = 0; n < int'(NP); n++)
          if (pv[k] && pa[k][a] == rd_addr[n]) hazard = 1'b1;

    can_defer = BYPASS && buf_fits;
    stall     = want_issue && (hazard || (nconf != 0 && !can_defer));
    issue     = want_issue && !stall;
    defer     = issue && nconf != 0;

    // Bank traffic of this cycle.
    bank_used = '0;
    for (int n = 0; n < int'(NP); n++) begin
      rd_en_b[n] = issue;
      if (issue) bank_used[rbank[n]] = 1'b1;
    end
    for (int w = 0; w < int'(NP); w++) begin
      wr_en_b[w]   = rst_n && wr_valid && !(defer && wconf[w]);
      wr_addr_b[w] = wr_addr_p[w];
      wr_data_b[w] = wr_data_p[w];
      if (wr_en_b[w]) bank_used[wbank[w]] = 1'b1;
    end
    // Write one parked word back into a bank nobody uses this cycle.
    drain     = 1'b0;
    drain_idx = '0;
    for (int e = 0; e < int'(BD); e++)
      if (!drain && buf_valid[e] && !bank_used[buf_bank[e]]) begin
        drain     = rst_n && state_q != ST_IDLE;
        drain_idx = IW'(e);
      end
    wr_en_b[NP]   = drain;
    wr_addr_b[NP] = buf_addr[drain_idx];
    wr_data_b[NP] = buf_data[drain_idx];

    // The host owns port 0 while idle.
    if (state_q == ST_IDLE) begin
      rd_en_b[0]   = !host_we;
      wr_en_b[0]   = rst_n && host_we;
      wr_addr_b[0] = host_addr;
      wr_data_b[0] = host_wdata;
    end
  end

  // ---------------------------------------------------------------- memory
  logic [S-1:0]   rd_addr_b [NP];
  logic [2*W-1:0] rd_data_b [NP];
  always_comb begin
    for (int n = 0; n < int'(NP); n++) rd_addr_b[n] = rd_addr[n];
    if (state_q == ST_IDLE) rd_addr_b[0] = host_addr;
  end
  assign host_rdata = rd_data_b[0];

  bank_array #(.D(D), .G(G), .W(2 * W), .NR(NP), .NW(NW)) u_mem (
    .clk,
    .rd_en  (rd_en_b),
    .rd_addr(rd_addr_b),
    .rd_data(rd_data_b),
    .wr_en  (wr_en_b),
    .wr_addr(wr_addr_b),
    .wr_data(wr_data_b)
  );

  logic           buf_hit      [NP];
  logic [2*W-1:0] buf_hit_data [NP];
  logic           buf_wr_en    [NP];
  for (genvar n = 0; n < int'(NP); n++) begin : g_bufwr
    assign buf_wr_en[n] = wr_en_b[n] && state_q != ST_IDLE;
  end

  bypass_buffer #(.S(S), .W(2 * W), .DEPTH(BD), .NR(NP), .NW(NP)) u_bypass (
    .clk, .rst_n,
    .req      (wreq),
    .defer    (defer),
    .wr_en    (buf_wr_en),
    .wr_addr  (wr_addr_p),
    .wr_data  (wr_data_p),
    .fits     (buf_fits),
    .drain_en (drain),
    .drain_idx(drain_idx),
    .rd_addr  (rd_addr),
    .hit      (buf_hit),
    .hit_data (buf_hit_data),
    .valid    (buf_valid),
    .addr     (buf_addr),
    .data     (buf_data)
  );

  // Operand values: a write parked this cycle, then the buffer, then the bank.
  logic [2*W-1:0] opnd [NP];
  always_comb begin
    for (int n = 0; n < int'(NP); n++) begin
      opnd[n] = rd_data_b[n];
      if (buf_hit[n]) opnd[n] = buf_hit_data[n];
      for (int w = 0; w < int'(NP); w++)
        if (defer && wconf[w] && wr_addr_p[w] == rd_addr[n]) opnd[n] = wr_data_p[w];
    end
  end

  // ---------------------------------------------------------------- butterflies
  logic [2*W-1:0] res [NP];
  for (genvar j = 0; j < int'(B); j++) begin : g_bf
    logic signed [TW-1:0] wr [R-1];
    logic signed [TW-1:0] wi [R-1];
    for (genvar t = 0; t < int'(R) - 1; t++) begin : g_rom
      twiddle_rom #(.D(D), .TW(TW)) u_rom (.k(ag_tw[j][t]), .wr(wr[t]), .wi(wi[t]));
    end
    if (R == 2) begin : g_r2
      butterfly_r2 #(.W(W), .TW(TW)) u_bf (
        .ar(opnd[2*j][2*W-1:W]),   .ai(opnd[2*j][W-1:0]),
        .br(opnd[2*j+1][2*W-1:W]), .bi(opnd[2*j+1][W-1:0]),
        .wr(wr[0]), .wi(wi[0]),
        .xr(res[2*j][2*W-1:W]),    .xi(res[2*j][W-1:0]),
        .yr(res[2*j+1][2*W-1:W]),  .yi(res[2*j+1][W-1:0])
      );
    end else begin : g_r4
      butterfly_r4 #(.W(W), .TW(TW)) u_bf (
        .x0(opnd[4*j]), .x1(opnd[4*j+1]), .x2(opnd[4*j+2]), .x3(opnd[4*j+3]),
        .w0r(wr[0]), .w0i(wi[0]), .w1r(wr[1]), .w1i(wi[1]), .w2r(wr[2]), .w2i(wi[2]),
        .y0(res[4*j]), .y1(res[4*j+1]), .y2(res[4*j+2]), .y3(res[4*j+3])
      );
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(P) - 1; k++) pv[k] <= 1'b0;
    end else begin
      pv[0] <= issue;
      for (int k = 1; k < int'(P) - 1; k++) pv[k] <= pv[k-1];
    end
    if (issue) begin
      pa[0] <= rd_addr;
      pd[0] <= res;
    end
    for (int k = 1; k < int'(P) - 1; k++) begin
      pa[k] <= pa[k-1];
      pd[k] <= pd[k-1];
    end
  end

  // ---------------------------------------------------------------- control
  logic finished;   // nothing left after this cycle's writes
  always_comb begin
    finished = 1'b1;
    for (int e = 0; e < int'(BD); e++)
      if (buf_valid[e] && !(drain && drain_idx == IW'(e))) finished = 1'b0;
    for (int k = 0; k < int'(P) - 2; k++) if (pv[k]) finished = 1'b0;
  end

  logic [31:0] cyc_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q  <= ST_IDLE;
      done     <= 1'b0;
      cyc_q    <= '0;
      cycles   <= '0;
      stalls   <= '0;
      bypasses <= '0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        ST_IDLE: if (start) begin
          state_q  <= ST_RUN;
          cyc_q    <= '0;
          stalls   <= '0;
          bypasses <= '0;
        end
        ST_RUN: begin
          cyc_q <= cyc_q + 1;
          if (stall) stalls <= stalls + 1;
          if (defer) bypasses <= bypasses + 1;
          if (issue && ag_last) state_q <= ST_FLUSH;
        end
        ST_FLUSH: begin
          cyc_q <= cyc_q + 1;
          if (finished) begin
            state_q <= ST_IDLE;
            done    <= 1'b1;
            cycles  <= cyc_q + 1;
          end
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  assign busy = state_q != ST_IDLE;

  // The schedule's promise: inside a stage no write meets a read in a bank.
  always_ff @(posedge clk) begin
    if (rst_n && state_q == ST_RUN && want_issue && nconf != 0)
      assert (wr_valid) else $error("conflict reported without a write");
  end
endmodule
