// sram_bank_tb: checks one single-ported bank.
//
// Writes random words to every address, reads them back, overwrites half of
// them and reads again against a model array; also checks that a read in the
// cycle after a write returns the new word and that a cycle without `we`
// leaves the contents alone.
module sram_bank_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        we;
  logic [7:0]  addr;
  logic [31:0] wdata, rdata;
  logic [31:0] model [256];

  sram_bank #(.WORDS(256), .W(32)) u_dut (.clk, .we, .addr, .wdata, .rdata);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int a = 0; a < 256; a++) begin
        if (pass == 0 || a % 2 == 1) begin
          @(negedge clk);
          we = 1; addr = 8'(a); wdata = $urandom; model[a] = wdata;
        end
      end
      @(negedge clk) we = 0;
      for (int a = 0; a < 256; a++) begin
        addr = 8'(255 - a); #1;
        check(rdata == model[255 - a], $sformatf("pass %0d addr %0d", pass, 255 - a));
      end
    end
    @(negedge clk); we = 1; addr = 8'd17; wdata = 32'hdead_beef;
    @(negedge clk); we = 0; #1;
    check(rdata == 32'hdead_beef, "read after write");
    wdata = 32'h1234_5678;
    @(negedge clk); #1;
    check(rdata == 32'hdead_beef, "no write without we");
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
