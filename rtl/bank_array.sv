// bank_array: the G single-ported banks of the engine and the routing between
// datapoint-addressed ports and the banks.
//
// D datapoints live in G banks of D/G words. A datapoint index is turned into
// (bank, row) by bank_map. Each cycle every read port and every write port may
// name one datapoint; a bank serves at most one of them (a write wins the bank
// if several name it, and an assertion reports any such collision, which the
// schedule and the engine's conflict logic must prevent). Read data are
// routed back to the read port whose datapoint lives in the bank, in the same
// cycle; writes take effect at the clock edge.
module bank_array #(
  parameter int unsigned D  = 1024,
  parameter int unsigned G  = 4,
  parameter int unsigned W  = 32,   // word width (one complex sample)
  parameter int unsigned NR = 2,    // read ports
  parameter int unsigned NW = 3,    // write ports
  localparam int unsigned S = $clog2(D),
  localparam int unsigned T = $clog2(G)
) (
  input  logic         clk,
  input  logic         rd_en   [NR],
  input  logic [S-1:0] rd_addr [NR],
  output logic [W-1:0] rd_data [NR],
  input  logic         wr_en   [NW],
  input  logic [S-1:0] wr_addr [NW],
  input  logic [W-1:0] wr_data [NW]
);
  logic [T-1:0]   rbank [NR];
  logic [S-T-1:0] rrow  [NR];
  logic [T-1:0]   wbank [NW];
  logic [S-T-1:0] wrow  [NW];

  logic           b_we    [G];
  logic [S-T-1:0] b_addr  [G];
  logic [W-1:0]   b_wdata [G];
  logic [W-1:0]   b_rdata [G];
  int unsigned    b_users [G];

  for (genvar r = 0; r < NR; r++) begin : g_rmap
    bank_map #(.S(S), .T(T)) u_map (.d(rd_addr[r]), .bank(rbank[r]), .row(rrow[r]));
    assign rd_data[r] = b_rdata[rbank[r]];
  end
  for (genvar w = 0; w < NW; w++) begin : g_wmap
    bank_map #(.S(S), .T(T)) u_map (.d(wr_addr[w]), .bank(wbank[w]), .row(wrow[w]));
  end

  for (genvar g = 0; g < G; g++) begin : g_bank
    always_comb begin
      b_we[g]    = 1'b0;
      b_addr[g]  = '0;
      b_wdata[g] = '0;
      b_users[g] = 0;
      for (int r = 0; r < NR; r++) begin
        if (rd_en[r] && rbank[r] == T'(g)) begin
          b_addr[g]  = rrow[r];
          b_users[g] = b_users[g] + 1;
        end
      end
      for (int w = 0; w < NW; w++) begin
        if (wr_en[w] && wbank[w] == T'(g)) begin
          b_we[g]    = 1'b1;
          b_addr[g]  = wrow[w];
          b_wdata[g] = wr_data[w];
          b_users[g] = b_users[g] + 1;
        end
      end
    end

    sram_bank #(.WORDS(D / G), .W(W)) u_bank (
      .clk  (clk),
      .we   (b_we[g]),
      .addr (b_addr[g]),
      .wdata(b_wdata[g]),
      .rdata(b_rdata[g])
    );

    // Single-port rule: at most one access per bank per cycle.
    always_ff @(posedge clk) begin
      assert (b_users[g] <= 1)
        else $error("bank %0d accessed %0d times in one cycle", g, b_users[g]);
    end
  end
endmodule
