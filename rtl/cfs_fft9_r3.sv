// cfs_fft9_r3: nine-point FFT built from radix-3 butterflies on three
// single-ported banks, placed with the group-4 conflict-free map.
//
// A radix-3 butterfly needs three operands per cycle. The group-4 map of
// sixteen locations (bank bit k = XOR of location bits k, k+2) puts every
// aligned group of four locations in four different banks; this engine uses
// only the locations that fall in banks 0, 1 and 2, three per group, so the
// nine datapoints need three banks of four words (one row unused) and the
// locations in bank 3 (3, 6, 9, 12..15) stay empty. Element b of group a
// lives at the location of group a whose bank is (a + b) mod 3, which gives
// 0,1,2 / 5,4,7 / 10,11,8 in bank order. Stage 0 runs one butterfly per
// group (elements 0..2 of group a); stage 1 runs one butterfly per element
// b across the groups, with twiddles W9^(a*b) on its inputs. Both stages
// therefore touch three different banks in every operation. Results are
// written back in place.
//
// Timing: a two-stage read-process/write pipeline without overlap; an
// operation reads and computes in one cycle and writes in the next, so a
// transform takes 2 stages x 3 operations x 2 = 12 cycles. `start` (one
// cycle, while idle) runs a transform, `busy` is high until the one-cycle
// `done`; `cycles` is the length of the last transform.
//
// Host side, while idle: host_addr names a location (0..15); host_we writes
// {re, im} (W bits each, two's complement) and host_rdata shows the word
// asynchronously (zero for the unused bank-3 locations). Load sample x[3m+r]
// into element m of group r; afterwards element b of group a holds
// X[b + 3a]/16 (each stage scales by 1/4).
//
// The group-4 map, the use of only three of its banks and the locations
// 0,1,2 / 5,4,7 / 10,11,8 follow the schedule's radix-3 example; the
// element-to-location order inside a group, the butterfly arithmetic, the
// pipeline and the interface are this design's choices.
module cfs_fft9_r3 #(
  parameter int unsigned W  = 16,
  parameter int unsigned TW = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  input  logic           host_we,
  input  logic [3:0]     host_addr,
  input  logic [2*W-1:0] host_wdata,
  output logic [2*W-1:0] host_rdata,
  output logic [31:0]    cycles
);
  localparam int unsigned R = 3;   // radix and number of banks used

  typedef logic [3:0] loc_t;
  typedef loc_t loc_table_t [R*R];   // index a*R + b
  typedef logic [2*TW-1:0] tw_table_t [9];

  function automatic logic [1:0] bank_of(loc_t l);
    return {l[1] ^ l[3], l[0] ^ l[2]};
  endfunction

  // location of element b of group a
  function automatic loc_table_t make_locs();
    loc_table_t t;
    loc_t l;
    for (int a = 0; a < int'(R); a++)
      for (int b = 0; b < int'(R); b++)
        for (int k = 0; k < 4; k++) begin
          l = loc_t'(4 * a + k);
          if (int'(bank_of(l)) == (a + b) % int'(R)) t[a * int'(R) + b] = l;
        end
    return t;
  endfunction

  // W9^k = exp(-j*2*pi*k/9), 1.0 = 2^(TW-2)
  function automatic tw_table_t make_tw();
    tw_table_t t;
    real ang;
    for (int k = 0; k < 9; k++) begin
      ang = 2.0 * 3.14159265358979323846 * k / 9.0;
      t[k] = {TW'($rtoi($floor($cos(ang) * (2.0 ** (TW - 2)) + 0.5))),
              TW'($rtoi($floor(-$sin(ang) * (2.0 ** (TW - 2)) + 0.5)))};
    end
    return t;
  endfunction

  localparam loc_table_t LOCS = make_locs();
  localparam tw_table_t  TWS  = make_tw();

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE} st_t;
  st_t        state_q;
  logic       stage_q;          // 0 or 1
  logic [1:0] op_q;             // 0..2
  logic [31:0] cyc_q;

  // operand n of the current operation
  loc_t           loc [R];
  logic [1:0]     obank [R];
  logic [2*TW-1:0] w [R];
  always_comb begin
    for (int n = 0; n < int'(R); n++) begin
      if (!stage_q) begin
        loc[n] = LOCS[int'(op_q) * int'(R) + n];
        w[n]   = TWS[0];
      end else begin
        loc[n] = LOCS[n * int'(R) + int'(op_q)];
        w[n]   = TWS[(n * int'(op_q)) % 9];
      end
      obank[n] = bank_of(loc[n]);
    end
  end

  // banks
  logic [2*W-1:0] rdata [R];
  logic [2*W-1:0] wdata [R];
  logic [1:0]     baddr [R];
  logic           bwe   [R];
  logic [2*W-1:0] y_q   [R];
  loc_t           wloc_q [R];
  logic [1:0]     hbank;
  assign hbank = bank_of(host_addr);

  for (genvar g = 0; g < int'(R); g++) begin : g_bank
    sram_bank #(.WORDS(4), .W(2 * W)) u_bank (
      .clk, .we(bwe[g]), .addr(baddr[g]), .wdata(wdata[g]), .rdata(rdata[g]));
  end

  always_comb begin
    for (int g = 0; g < int'(R); g++) begin
      bwe[g]   = 1'b0;
      baddr[g] = '0;
      wdata[g] = '0;
      if (state_q == S_IDLE) begin
        if (int'(hbank) == g) begin
          baddr[g] = host_addr[3:2];
          bwe[g]   = rst_n && host_we;
          wdata[g] = host_wdata;
        end
      end else begin
        for (int n = 0; n < int'(R); n++) begin
          if (state_q == S_READ && int'(obank[n]) == g) baddr[g] = loc[n][3:2];
          if (state_q == S_WRITE && int'(bank_of(wloc_q[n])) == g) begin
            baddr[g] = wloc_q[n][3:2];
            bwe[g]   = rst_n;
            wdata[g] = y_q[n];
          end
        end
      end
    end
  end

  assign host_rdata = (hbank == 2'd3) ? '0 : rdata[hbank];

  // operands and butterfly
  logic [2*W-1:0] opnd [R];
  logic signed [W-1:0] y0r, y0i, y1r, y1i, y2r, y2i;
  always_comb
    for (int n = 0; n < int'(R); n++) opnd[n] = rdata[obank[n]];

  butterfly_r3 #(.W(W), .TW(TW)) u_bf (
    .a0r(opnd[0][2*W-1:W]), .a0i(opnd[0][W-1:0]),
    .a1r(opnd[1][2*W-1:W]), .a1i(opnd[1][W-1:0]),
    .a2r(opnd[2][2*W-1:W]), .a2i(opnd[2][W-1:0]),
    .w1r(w[1][2*TW-1:TW]), .w1i(w[1][TW-1:0]),
    .w2r(w[2][2*TW-1:TW]), .w2i(w[2][TW-1:0]),
    .y0r, .y0i, .y1r, .y1i, .y2r, .y2i);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      stage_q <= 1'b0;
      op_q    <= '0;
      cyc_q   <= '0;
      cycles  <= '0;
      done    <= 1'b0;
      for (int n = 0; n < int'(R); n++) begin
        y_q[n]    <= '0;
        wloc_q[n] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q <= S_READ;
          stage_q <= 1'b0;
          op_q    <= '0;
          cyc_q   <= '0;
        end
        S_READ: begin
          y_q[0]  <= {y0r, y0i};
          y_q[1]  <= {y1r, y1i};
          y_q[2]  <= {y2r, y2i};
          for (int n = 0; n < int'(R); n++) wloc_q[n] <= loc[n];
          cyc_q   <= cyc_q + 1;
          state_q <= S_WRITE;
        end
        S_WRITE: begin
          cyc_q <= cyc_q + 1;
          if (op_q == 2'd2) begin
            op_q <= '0;
            if (stage_q) begin
              state_q <= S_IDLE;
              done    <= 1'b1;
              cycles  <= cyc_q + 1;
            end else begin
              stage_q <= 1'b1;
              state_q <= S_READ;
            end
          end else begin
            op_q    <= op_q + 1'b1;
            state_q <= S_READ;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = state_q != S_IDLE;

  // every operation must touch three different banks, none of them bank 3
  always_ff @(posedge clk) begin
    if (rst_n && state_q == S_READ)
      assert (obank[0] != obank[1] && obank[0] != obank[2] && obank[1] != obank[2] &&
              obank[0] != 2'd3 && obank[1] != 2'd3 && obank[2] != 2'd3)
        else $error("bank conflict in radix-3 operation");
  end
endmodule
