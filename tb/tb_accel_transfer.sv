// tb_accel_transfer: host transfer test of the whole accelerator at its
// default sizes. Blocks of 1 KiB, 64 KiB and the full 512 KiB image memory
// are written through the host port at one word per clock and read back with
// one read issued per clock; every word must come back unchanged, each read
// exactly one cycle after it was issued, and a block of N words must take N
// cycles each way. The register window above the memory must stay intact.
module tb_accel_transfer;
  import he_pkg::*;
  localparam int NBLK = 3;
  localparam int WORDS [NBLK] = '{256, 16384, 131072};
  logic clk = 0, rst_n = 0;
  avm_req_t host_req;
  avm_rsp_t host_rsp;
  logic busy, done;
  int checks = 0, failures = 0, cyc = 0;

  accel_wrapper dut (.*);

  always #4 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t pattern(int blk, int i);
    return word_t'(i * 32'h9E3779B1) ^ word_t'(blk << 28);
  endfunction

  initial begin
    int t0, got;
    host_req = AVM_REQ_IDLE;
    repeat (3) @(posedge clk); rst_n = 1;
    while (busy) @(negedge clk);
    // a register value that must survive the memory transfers
    @(negedge clk);
    host_req.write = 1; host_req.address = 18'h20003; host_req.writedata = 32'd77; host_req.byteenable = '1;
    for (int b = 0; b < NBLK; b++) begin
      // write burst, one word per clock
      t0 = cyc;
      for (int i = 0; i < WORDS[b]; i++) begin
        @(negedge clk);
        host_req = AVM_REQ_IDLE;
        host_req.write = 1; host_req.address = addr_t'(i);
        host_req.writedata = pattern(b, i); host_req.byteenable = '1;
        if (host_rsp.waitrequest) begin failures++; $display("host stalled"); end
      end
      @(negedge clk) host_req = AVM_REQ_IDLE;
      checks++;
      if (cyc - t0 != WORDS[b] + 1) begin failures++; $display("write burst %0d cycles", cyc - t0); end
      // read burst, one read issued per clock, data checked the cycle after
      got = 0;
      t0 = cyc;
      for (int i = 0; i <= WORDS[b]; i++) begin
        @(negedge clk);
        if (i > 0) begin
          checks++;
          if (!host_rsp.readdatavalid || host_rsp.readdata != pattern(b, i - 1)) begin
            failures++;
            if (failures < 10) $display("word %0d: %h valid %0d expected %h", i - 1,
                                        host_rsp.readdata, host_rsp.readdatavalid, pattern(b, i - 1));
          end
          got++;
        end
        host_req = AVM_REQ_IDLE;
        if (i < WORDS[b]) begin host_req.read = 1; host_req.address = addr_t'(i); end
      end
      checks++;
      if (got != WORDS[b] || cyc - t0 != WORDS[b] + 1) begin
        failures++; $display("read burst %0d words in %0d cycles", got, cyc - t0);
      end
      $display("block of %0d words (%0d KiB): written and read back", WORDS[b], WORDS[b] / 256);
    end
    @(negedge clk);
    host_req = AVM_REQ_IDLE; host_req.read = 1; host_req.address = 18'h20003;
    @(negedge clk);
    host_req = AVM_REQ_IDLE;
    checks++;
    if (!host_rsp.readdatavalid || host_rsp.readdata != 32'd77) begin failures++; $display("register changed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
