// tb_config_slave: writes and reads back every register, checks that a start
// with a usable configuration gives one start pulse, that a bad command or a
// too-short length sets the error bit and starts nothing, that the process
// time counts the busy cycles and that status reports busy and done.
module tb_config_slave;
  import he_pkg::*;
  logic clk = 0, rst_n = 0;
  logic reg_rd, reg_wr, start, busy, done;
  logic [3:0] reg_addr;
  word_t reg_wdata, reg_rdata, src_addr, dst_addr, length;
  logic [17:0] npix;
  int checks = 0, failures = 0, starts = 0;

  config_slave dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) if (start) starts++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input word_t d);
    @(negedge clk); reg_wr = 1; reg_addr = 4'(a); reg_wdata = d;
    @(negedge clk); reg_wr = 0;
    @(negedge clk);
  endtask

  task automatic rd_check(input int a, input word_t exp, input string what);
    @(negedge clk); reg_rd = 1; reg_addr = 4'(a);
    @(negedge clk); reg_rd = 0;
    checks++;
    if (reg_rdata !== exp) begin
      failures++; $display("%s: read %h expected %h", what, reg_rdata, exp);
    end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s starts=%0d", what, starts); end
  endtask

  initial begin
    reg_rd = 0; reg_wr = 0; reg_addr = 0; reg_wdata = 0; busy = 0; done = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    wr(0, 32'h100); wr(1, 32'h8000); wr(2, 300); wr(3, 20); wr(4, 20); wr(5, 1);
    rd_check(0, 32'h100, "src"); rd_check(1, 32'h8000, "dst"); rd_check(2, 300, "len");
    rd_check(3, 20, "height"); rd_check(4, 20, "width"); rd_check(5, 1, "cmd");
    rd_check(12, 0, "unused");
    check(src_addr == 32'h100 && dst_addr == 32'h8000 && length == 300, "outputs");
    check(npix == 400, "npix = height*width");
    // good start
    wr(6, 1);
    check(starts == 1, "one start pulse");
    busy = 1;
    repeat (50) @(negedge clk);
    rd_check(8, 32'h1, "status busy");
    busy = 0; done = 1; @(negedge clk); done = 0;
    // ptime: busy for the 50 cycles + the cycles of the status read
    rd_check(7, 52, "process time");
    rd_check(8, 32'h2, "status done");
    // start while busy is ignored
    busy = 1; wr(6, 1); check(starts == 1, "no start while busy"); busy = 0;
    // bad command
    wr(5, 7); wr(6, 1);
    check(starts == 1, "bad command does not start");
    rd_check(8, 32'h4, "status error");
    // length too short for 400 pixels (needs 300 words)
    wr(5, 1); wr(2, 299); wr(6, 1);
    check(starts == 1, "short length does not start");
    rd_check(8, 32'h4, "status error 2");
    // image beyond memory end
    wr(2, 300); wr(1, 131072 - 299); wr(6, 1);
    check(starts == 1, "target past memory end does not start");
    wr(1, 131072 - 300); wr(6, 1);
    check(starts == 2, "valid again");
    rd_check(8, 32'h0, "status cleared by start");
    // read-only registers ignore writes
    wr(7, 32'hdead); rd_check(7, 0, "ptime read-only and restarted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
