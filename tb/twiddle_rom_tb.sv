// twiddle_rom_tb: checks every twiddle factor of the 1024-point table.
//
// Each entry k must equal round(cos(2 pi k/D) 2^14) and round(-sin(2 pi k/D)
// 2^14), computed here at run time; W^0 = 1, W^(D/8) = (1-j)/sqrt(2) and
// W^(D/4) = -j are also checked by value.
module twiddle_rom_tb;
  import fft_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [8:0] k;
  logic signed [15:0] wr, wi;

  twiddle_rom #(.D(1024), .TW(16)) u_dut (.k, .wr, .wi);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 512; n++) begin
      k = 9'(n); #1;
      check(int'(wr) == tw_re(n, 1024, 16) && int'(wi) == tw_im(n, 1024, 16),
            $sformatf("k=%0d: (%0d,%0d)", n, wr, wi));
    end
    k = 9'd0;   #1; check(wr == 16384 && wi == 0, "W^0");
    k = 9'd128; #1; check(wr == 11585 && wi == -11585, "W^128");
    k = 9'd256; #1; check(wr == 0 && wi == -16384, "W^256");
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
