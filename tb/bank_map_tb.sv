// bank_map_tb: checks the datapoint-to-bank parity map.
//
// Exhaustive check for D=1024/G=4 and D=256/G=8 against the map computed
// here bit by bit (bank bit k = XOR of datapoint bits at positions k, k+T,
// k+2T, ...; row = upper S-T bits), plus the bank numbers printed for the
// 8-point four-bank example (datapoints 0..7 -> banks 0,1,2,3,1,0,3,2), the
// 64-point example (datapoints 3,7,11,15 -> banks 3,2,1,0) and datapoint 141
// of the 256-point example (bank 6). Also checks that the (bank,row) pair is
// unique for every datapoint.
module bank_map_tb;
  int checks = 0, failures = 0;

  logic [9:0] d10;  logic [1:0] b10; logic [7:0] r10;
  logic [7:0] d8;   logic [2:0] b8;  logic [4:0] r8;
  logic [2:0] d3;   logic [1:0] b3;  logic       r3;
  logic [5:0] d6;   logic [1:0] b6;  logic [3:0] r6;

  bank_map #(.S(10), .T(2)) u10 (.d(d10), .bank(b10), .row(r10));
  bank_map #(.S(8),  .T(3)) u8  (.d(d8),  .bank(b8),  .row(r8));
  bank_map #(.S(3),  .T(2)) u3  (.d(d3),  .bank(b3),  .row(r3));
  bank_map #(.S(6),  .T(2)) u6  (.d(d6),  .bank(b6),  .row(r6));

  function automatic int unsigned par(int unsigned d, int unsigned s, int unsigned t);
    int unsigned m;
    m = 0;
    for (int unsigned b = 0; b < s; b++) if ((d >> b) & 1) m ^= 1 << (b % t);
    return m;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    bit seen [int];
    int fig3 [8] = '{0, 1, 2, 3, 1, 0, 3, 2};
    int fig14_d [4] = '{3, 7, 11, 15};
    int fig14_m [4] = '{3, 2, 1, 0};
    for (int d = 0; d < 1024; d++) begin
      d10 = 10'(d); #1;
      check(b10 == 2'(par(d, 10, 2)) && r10 == 8'(d >> 2), $sformatf("D=1024 d=%0d", d));
      check(!seen.exists(int'({b10, r10})), $sformatf("D=1024 (bank,row) reused at d=%0d", d));
      seen[int'({b10, r10})] = 1;
    end
    for (int d = 0; d < 256; d++) begin
      d8 = 8'(d); #1;
      check(b8 == 3'(par(d, 8, 3)) && r8 == 5'(d >> 3), $sformatf("D=256 d=%0d", d));
    end
    for (int d = 0; d < 8; d++) begin
      d3 = 3'(d); #1;
      check(int'(b3) == fig3[d], $sformatf("8-point example d=%0d bank %0d", d, b3));
    end
    for (int n = 0; n < 4; n++) begin
      d6 = 6'(fig14_d[n]); #1;
      check(int'(b6) == fig14_m[n], $sformatf("64-point example d=%0d bank %0d", fig14_d[n], b6));
    end
    d8 = 8'd141; #1;
    check(b8 == 3'd6, $sformatf("256-point example d=141 bank %0d", b8));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
