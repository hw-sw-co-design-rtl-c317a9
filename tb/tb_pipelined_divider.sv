// tb_pipelined_divider: feeds one random division per cycle (with random
// gaps) into the divider at its default 40-bit width and checks every
// quotient, remainder and tag against the arithmetic result, and that each
// result leaves exactly 40 cycles after it entered.
module tb_pipelined_divider;
  localparam int N = 40, D = 24, T = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic [N-1:0] dividend, quotient;
  logic [D-1:0] divisor, remainder;
  logic [T-1:0] in_tag, out_tag;
  int checks = 0, failures = 0, cycle = 0;

  typedef struct { longint unsigned q, r; int tag, t_in; } exp_t;
  exp_t expq [$];

  pipelined_divider dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (expq.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = expq.pop_front();
      if (quotient != N'(e.q) || remainder != D'(e.r) || int'(out_tag) != e.tag ||
          cycle - e.t_in != N) begin
        failures++;
        $display("mismatch tag %0d: q=%0d exp %0d r=%0d exp %0d lat=%0d",
                 out_tag, quotient, e.q, remainder, e.r, cycle - e.t_in);
      end
    end
  end

  initial begin
    in_valid = 0; dividend = 0; divisor = 1; in_tag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      case (i % 4)
        0: dividend = {$urandom, $urandom} & {N{1'b1}};
        1: dividend = 255 * ($urandom % (1 << 20));
        2: dividend = $urandom % 1000;
        default: dividend = {N{1'b1}};
      endcase
      divisor = (i % 7 == 0) ? D'(3 * ($urandom % 100000) + 3) : D'($urandom % (1 << D) | 1);
      if (i == 5) divisor = 1;
      // exact multiples exercise the remainder == divisor boundary
      if (i % 5 == 0) dividend = N'(longint'(divisor) * longint'($urandom % 100000));
      in_tag = T'(i);
      if (in_valid) begin
        exp_t e;
        e.q = longint'(dividend) / longint'(divisor);
        e.r = longint'(dividend) % longint'(divisor);
        e.tag = i % 256;
        e.t_in = cycle;
        expq.push_back(e);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (N + 5) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d results missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
