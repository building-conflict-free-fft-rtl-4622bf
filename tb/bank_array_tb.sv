// bank_array_tb: checks the banked memory and its routing.
//
// 64 datapoints in 4 banks, 2 read and 3 write ports. Fills memory through
// all write ports at once (three datapoints in three different banks per
// cycle), reads it back two datapoints per cycle, then runs random cycles that
// read two and write two datapoints, all in distinct banks, against a model.
module bank_array_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rd_en [2];  logic [5:0] rd_addr [2]; logic [31:0] rd_data [2];
  logic        wr_en [3];  logic [5:0] wr_addr [3]; logic [31:0] wr_data [3];
  logic [31:0] model [64];

  bank_array #(.D(64), .G(4), .W(32), .NR(2), .NW(3)) u_dut (.clk, .rd_en, .rd_addr, .rd_data,
                                                             .wr_en, .wr_addr, .wr_data);

  function automatic int unsigned bnk(int unsigned d);
    return (d ^ (d >> 2) ^ (d >> 4)) & 3;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // pick a datapoint whose bank is not in `used`, mark its bank
  function automatic int unsigned pick(ref bit used [4]);
    int unsigned d;
    do d = $urandom_range(63); while (used[bnk(d)]);
    used[bnk(d)] = 1;
    return d;
  endfunction

  initial begin
    int queue [$];
    bit used [4];
    for (int p = 0; p < 2; p++) begin rd_en[p] = 0; rd_addr[p] = 0; end
    for (int p = 0; p < 3; p++) begin wr_en[p] = 0; wr_addr[p] = 0; wr_data[p] = 0; end
    for (int d = 0; d < 64; d++) queue.push_back(d);
    // fill: groups of three datapoints in distinct banks
    while (queue.size() > 0) begin
      @(negedge clk);
      foreach (used[b]) used[b] = 0;
      for (int p = 0; p < 3; p++) begin
        wr_en[p] = 0;
        for (int q = 0; q < queue.size(); q++)
          if (!used[bnk(queue[q])]) begin
            used[bnk(queue[q])] = 1;
            wr_en[p] = 1; wr_addr[p] = 6'(queue[q]); wr_data[p] = $urandom;
            model[queue[q]] = wr_data[p];
            queue.delete(q);
            break;
          end
      end
    end
    @(negedge clk);
    for (int p = 0; p < 3; p++) wr_en[p] = 0;
    for (int d = 0; d < 64; d++) begin
      rd_en[0] = 1; rd_addr[0] = 6'(d); #1;
      check(rd_data[0] == model[d], $sformatf("fill readback %0d", d));
    end
    for (int c = 0; c < 500; c++) begin
      @(negedge clk);
      foreach (used[b]) used[b] = 0;
      for (int p = 0; p < 2; p++) begin rd_en[p] = 1; rd_addr[p] = 6'(pick(used)); end
      for (int p = 0; p < 2; p++) begin
        wr_en[p] = 1; wr_addr[p] = 6'(pick(used)); wr_data[p] = $urandom;
      end
      #1;
      for (int p = 0; p < 2; p++)
        check(rd_data[p] == model[rd_addr[p]], $sformatf("cycle %0d read port %0d", c, p));
      for (int p = 0; p < 2; p++) model[wr_addr[p]] = wr_data[p];
    end
    @(negedge clk);
    for (int p = 0; p < 3; p++) wr_en[p] = 0;
    rd_en[0] = 0;
    for (int d = 0; d < 64; d++) begin
      rd_addr[1] = 6'(d); #1;
      check(rd_data[1] == model[d], $sformatf("final readback %0d", d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
