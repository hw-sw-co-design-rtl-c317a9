// tb_onchip_memory: random byte-enabled writes and reads on both ports of a
// 1024-word memory, compared with a model array; read data must appear one
// cycle after the read, and a read in the cycle of a write returns old data.
module tb_onchip_memory;
  localparam int DEPTH = 1024, AW = 10;
  logic clk = 0;
  logic a_rd, a_wr, b_rd, b_wr;
  logic [AW-1:0] a_addr, b_addr;
  logic [3:0] a_be, b_be;
  logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;
  int checks = 0, failures = 0;
  bit [31:0] model [DEPTH];
  bit a_pend, b_pend;
  bit [31:0] a_exp, b_exp;

  onchip_memory #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit [31:0] merge(bit [31:0] old, bit [31:0] d, bit [3:0] be);
    for (int i = 0; i < 4; i++) if (be[i]) old[8*i +: 8] = d[8*i +: 8];
    return old;
  endfunction

  initial begin
    a_rd = 0; a_wr = 0; b_rd = 0; b_wr = 0;
    a_addr = 0; b_addr = 0; a_be = 0; b_be = 0; a_wdata = 0; b_wdata = 0;
    // initialise through port A so every model word is known
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_wr = 1; a_addr = AW'(i); a_be = 4'hf; a_wdata = $urandom; model[i] = a_wdata;
    end
    @(negedge clk) a_wr = 0;
    for (int n = 0; n < 8000; n++) begin
      @(negedge clk);
      if (a_pend) begin checks++; if (a_rdata != a_exp) begin failures++;
        $display("A read %h exp %h", a_rdata, a_exp); end end
      if (b_pend) begin checks++; if (b_rdata != b_exp) begin failures++;
        $display("B read %h exp %h", b_rdata, b_exp); end end
      a_addr = AW'($urandom % 64); b_addr = AW'($urandom % 64);
      a_rd = $urandom % 2; b_rd = $urandom % 2;
      a_wr = $urandom % 2; b_wr = ($urandom % 2) && (b_addr != a_addr || !a_wr);
      a_be = 4'($urandom); b_be = 4'($urandom);
      a_wdata = $urandom; b_wdata = $urandom;
      a_pend = a_rd; b_pend = b_rd;
      a_exp = model[a_addr]; b_exp = model[b_addr];
      if (a_wr) model[a_addr] = merge(model[a_addr], a_wdata, a_be);
      if (b_wr) model[b_addr] = merge(model[b_addr], b_wdata, b_be);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
