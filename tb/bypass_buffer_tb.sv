// bypass_buffer_tb: checks parking, forwarding, replacement, supersession
// and drain of the bypass buffer (two entries, two write and two read ports).
module bypass_buffer_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        req [2], wr_en [2], hit [2], valid [2];
  logic [9:0]  wr_addr [2], rd_addr [2], addr [2];
  logic [31:0] wr_data [2], hit_data [2], data [2];
  logic        defer, fits, drain_en;
  logic [0:0]  drain_idx;

  bypass_buffer #(.S(10), .W(32), .DEPTH(2), .NR(2), .NW(2)) u_dut (
    .clk, .rst_n, .req, .defer, .wr_en, .wr_addr, .wr_data, .fits, .drain_en, .drain_idx,
    .rd_addr, .hit, .hit_data, .valid, .addr, .data);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic idle();
    for (int p = 0; p < 2; p++) begin req[p] = 0; wr_en[p] = 0; end
    defer = 0; drain_en = 0; drain_idx = 0;
  endtask

  function automatic int nvalid();
    return int'(valid[0]) + int'(valid[1]);
  endfunction

  initial begin
    idle();
    for (int p = 0; p < 2; p++) begin wr_addr[p] = 0; wr_data[p] = 0; rd_addr[p] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1 check(nvalid() == 0, "empty after reset");
    // park datapoint 100
    req[0] = 1; wr_addr[0] = 10'd100; wr_data[0] = 32'haaaa_0001; #1;
    check(fits, "one word fits an empty buffer");
    defer = 1;
    @(negedge clk); idle();
    rd_addr[0] = 10'd7; rd_addr[1] = 10'd100; #1;
    check(nvalid() == 1, "one entry held");
    check(!hit[0] && hit[1] && hit_data[1] == 32'haaaa_0001, "forward parked word");
    // two new words with one free entry: does not fit
    req[0] = 1; wr_addr[0] = 10'd200; req[1] = 1; wr_addr[1] = 10'd300; #1;
    check(!fits, "two new words do not fit one free entry");
    // a newer copy of 100 plus one new word: fits (100 replaces its own entry)
    wr_addr[0] = 10'd100; wr_data[0] = 32'haaaa_0002; wr_data[1] = 32'hbbbb_0001; #1;
    check(fits, "replacement plus one new word fits");
    defer = 1;
    @(negedge clk); idle();
    rd_addr[0] = 10'd100; rd_addr[1] = 10'd300; #1;
    check(nvalid() == 2, "two entries held");
    check(hit[0] && hit_data[0] == 32'haaaa_0002, "replaced word forwarded");
    check(hit[1] && hit_data[1] == 32'hbbbb_0001, "second word forwarded");
    // full buffer: a new word does not fit
    req[0] = 1; wr_addr[0] = 10'd5; #1;
    check(!fits, "full buffer refuses a new word");
    idle();
    // a newer write of 300 reaching the banks drops its entry
    wr_en[1] = 1; wr_addr[1] = 10'd300;
    @(negedge clk); idle(); #1;
    check(nvalid() == 1 && !hit[1], "superseded entry dropped");
    check(hit[0], "other entry kept");
    // drain the entry holding 100
    drain_en = 1;
    drain_idx = (valid[0] && addr[0] == 10'd100) ? 1'b0 : 1'b1;
    check(data[drain_idx] == 32'haaaa_0002, "drain sees the parked word");
    @(negedge clk); idle(); #1;
    check(nvalid() == 0 && !hit[0], "drained entry dropped");
    // reset clears
    req[0] = 1; wr_addr[0] = 10'd9; defer = 1;
    @(negedge clk); idle(); rst_n = 0;
    @(negedge clk); rst_n = 1; #1;
    check(nvalid() == 0, "reset clears the buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
