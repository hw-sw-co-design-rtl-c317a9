// tb_write_master: pixels go in whenever the write master is not full (with
// random gaps), a memory model with random waitrequest takes the writes. At
// the end the memory must hold exactly the packed pixel bytes at the target,
// the byte after the image in the last, partial word must be untouched, done
// must pulse once, and heavy waitrequest must have driven `full` at least once.
module tb_write_master;
  import he_pkg::*;
  import he_ref_pkg::*;
  localparam int NPIX = 501, BASE = 100;
  logic clk = 0, rst_n = 0;
  logic go, pix_valid, full, done;
  word_t base_addr;
  logic [17:0] npix;
  pixel_t pix;
  avm_req_t avm_req;
  avm_rsp_t avm_rsp;
  bit [7:0] img [];
  word_t mem [2048];
  int checks = 0, failures = 0, sent = 0, dones = 0, fulls = 0, waits = 0;
  bit heavy = 0;

  write_master dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (avm_req.write && !avm_rsp.waitrequest)
      for (int i = 0; i < 4; i++)
        if (avm_req.byteenable[i]) mem[avm_req.address[10:0]][8*i +: 8] <= avm_req.writedata[8*i +: 8];

  // Drive at the falling edge; `full` is a register output, stable here.
  always @(negedge clk) begin
    avm_rsp.waitrequest = heavy ? ($urandom % 8 != 0) : ($urandom % 4 == 0);
    if (avm_rsp.waitrequest && avm_req.write) waits++;
    if (full) fulls++;
    if (done) dones++;
    if (rst_n && !go && sent < NPIX && !full && ($urandom % 5 != 0)) begin
      pix_valid = 1;
      pix = {img[3*sent+2], img[3*sent+1], img[3*sent]};
      sent++;
    end else begin
      pix_valid = 0;
    end
  end

  initial begin
    make_bright_image(img, NPIX, 3);
    for (int i = 0; i < 2048; i++) mem[i] = 32'h5A5A5A5A;
    avm_rsp = '0; go = 0; pix_valid = 0; pix = '0;
    base_addr = BASE; npix = NPIX;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); go = 1;
    @(negedge clk); go = 0;
    repeat (300) @(negedge clk);
    heavy = 1;
    repeat (300) @(negedge clk);
    heavy = 0;
    while (dones == 0) @(negedge clk);
    repeat (5) @(negedge clk);
    for (int b = 0; b < 3 * NPIX; b++) begin
      checks++;
      if (mem[BASE + b / 4][8 * (b % 4) +: 8] != img[b]) begin
        failures++;
        if (failures < 10) $display("byte %0d: %h expected %h", b, mem[BASE + b / 4][8 * (b % 4) +: 8], img[b]);
      end
    end
    checks++;
    if (mem[BASE + (3 * NPIX) / 4][31:24] != 8'h5A) begin failures++; $display("byte past end written"); end
    checks++;
    if (mem[BASE - 1] != 32'h5A5A5A5A || mem[BASE + words_for(NPIX)] != 32'h5A5A5A5A) begin
      failures++; $display("write outside the image");
    end
    checks++;
    if (dones != 1) begin failures++; $display("%0d done pulses", dones); end
    checks++;
    if (fulls == 0 || waits == 0) begin failures++; $display("full never asserted"); end
    $display("full asserted %0d cycles, %0d waitrequest cycles", fulls, waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
