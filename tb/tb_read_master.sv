// tb_read_master: a memory model with one-cycle read latency serves the read
// master. Pass 1 has no waitrequest and an always-ready consumer: every pixel
// must match the packed source bytes and the pass must sustain one pixel per
// clock (npix plus a small fill latency). Pass 2 adds random waitrequest and
// random consumer stalls and checks the same pixel sequence and the done pulse.
module tb_read_master;
  import he_pkg::*;
  import he_ref_pkg::*;
  localparam int NPIX = 501, BASE = 37;
  logic clk = 0, rst_n = 0;
  logic go, pix_valid, pix_ready, done;
  word_t base_addr, length;
  logic [17:0] npix;
  avm_req_t avm_req;
  avm_rsp_t avm_rsp;
  pixel_t pix;
  bit [7:0] img [];
  word_t mem [4096];
  int checks = 0, failures = 0, got = 0, dones = 0, cyc = 0;
  bit rand_wait = 0, rand_ready = 0;

  read_master dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model
  always @(posedge clk) begin
    avm_rsp.readdatavalid <= avm_req.read && !avm_rsp.waitrequest;
    avm_rsp.readdata      <= mem[avm_req.address[11:0]];
  end
  // Inputs change at the falling edge; the check then sees exactly what the
  // next rising edge will sample.
  always @(negedge clk) begin
    avm_rsp.waitrequest = rand_wait ? ($urandom % 3 == 0) : 1'b0;
    pix_ready           = rand_ready ? ($urandom % 3 != 0) : 1'b1;
    #1;
    if (pix_valid && pix_ready) begin
      checks++;
      if (pix != {img[3*got+2], img[3*got+1], img[3*got]}) begin
        failures++;
        $display("pixel %0d: %h expected %h", got, pix, {img[3*got+2], img[3*got+1], img[3*got]});
      end
      got++;
    end
    if (done) dones++;
  end

  task automatic run_pass(input bit w, input bit r, input int max_cycles);
    int t0;
    rand_wait = w; rand_ready = r; got = 0; dones = 0;
    @(negedge clk); go = 1; t0 = cyc;
    @(negedge clk); go = 0;
    while (dones == 0 && cyc - t0 < 20000) @(negedge clk);
    checks++;
    if (got != NPIX || dones != 1) begin failures++; $display("got %0d pixels, %0d done", got, dones); end
    if (max_cycles > 0) begin
      checks++;
      if (cyc - t0 > max_cycles) begin failures++; $display("pass took %0d cycles", cyc - t0); end
      else $display("pass of %0d pixels took %0d cycles", NPIX, cyc - t0);
    end
  endtask

  initial begin
    make_bright_image(img, NPIX + 2, 7);
    for (int i = 0; i < 4096; i++) mem[i] = $urandom;
    for (int b = 0; b < 3 * NPIX; b++) mem[BASE + b / 4][8 * (b % 4) +: 8] = img[b];
    avm_rsp = '0; pix_ready = 1; go = 0;
    base_addr = BASE; length = words_for(NPIX) + 5; npix = NPIX;
    repeat (3) @(posedge clk); rst_n = 1;
    run_pass(0, 0, NPIX + 8);
    run_pass(1, 1, 0);
    run_pass(0, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
