// tb_hist_equalizer: the core between stream models of the read and write
// masters. Two images are equalized (a bright one and a dark one); every
// output pixel is compared with the reference table computed from the
// definition of histogram equalization. The time from the end of the
// histogram pass to the start of the second pass must be the 256 cumulative
// steps plus 256 + 40 division steps (552) plus at most 8 cycles of pipeline
// fill, and `write_full` stalls in the second pass must lose no pixel.
module tb_hist_equalizer;
  import he_pkg::*;
  import he_ref_pkg::*;
  localparam int NPIX = 700;
  logic clk = 0, rst_n = 0;
  logic start, busy, done, rd_go, pix_in_valid, pix_in_ready, read_done;
  logic wr_go, pix_out_valid, write_full, write_done;
  logic [17:0] npix;
  pixel_t pix_in, pix_out;
  bit [7:0] img [];
  bit [7:0] tref [256];
  int checks = 0, failures = 0, cyc = 0;
  int sent = 0, got = 0, pass = 0, stalls = 0, dones = 0;
  int t_read_done = 0, t_wr_go = 0;
  bit streaming = 0, rd_done_next = 0;

  hist_equalizer dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Read-side and write-side models, driven at the falling edge.
  always @(negedge clk) begin
    read_done  = rd_done_next;
    rd_done_next = 0;
    if (read_done && pass == 1) t_read_done = cyc;
    if (rd_go) begin streaming = 1; sent = 0; pass++; end
    if (wr_go) begin t_wr_go = cyc; got = 0; end
    if (done) dones++;
    write_full = pass == 2 && ($urandom % 4 == 0);
    if (write_full) stalls++;
    if (pix_out_valid) begin
      bit [23:0] exp;
      exp = {tref[img[3*got+2]], tref[img[3*got+1]], tref[img[3*got]]};
      checks++;
      if (pix_out != exp) begin
        failures++;
        if (failures < 10) $display("pixel %0d: %h expected %h", got, pix_out, exp);
      end
      got++;
    end
    // all pixels stored: held until the core reports done
    write_done = pass == 2 && got == NPIX && dones == 0;
    pix_in_valid = streaming && sent < NPIX && ($urandom % 6 != 0);
    if (pix_in_valid) pix_in = {img[3*sent+2], img[3*sent+1], img[3*sent]};
    #1;
    if (pix_in_valid && pix_in_ready) begin
      sent++;
      if (sent == NPIX) begin streaming = 0; rd_done_next = 1; end
    end
  end

  task automatic run(input int seed, input bit dark);
    int t0;
    make_bright_image(img, NPIX, seed);
    if (dark) foreach (img[i]) img[i] = 8'(255 - img[i]) >> 1;
    ref_table(img, NPIX, tref);
    pass = 0; dones = 0;
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (dones == 0 && cyc - t0 < 20000) @(negedge clk);
    checks++;
    if (got != NPIX || dones != 1) begin failures++; $display("got %0d pixels", got); end
    checks++;
    if (t_wr_go - t_read_done < 552 || t_wr_go - t_read_done > 560) begin
      failures++; $display("CUMU+TRAN took %0d cycles", t_wr_go - t_read_done);
    end else $display("CUMU+TRAN took %0d cycles", t_wr_go - t_read_done);
    checks++;
    if (tref[255] != 255 || stalls == 0) begin failures++; $display("table end %0d, stalls %0d", tref[255], stalls); end
  endtask

  initial begin
    start = 0; npix = NPIX; pix_in = '0; pix_in_valid = 0; read_done = 0;
    write_full = 0; write_done = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // the histogram memories are swept clear after reset
    while (busy) @(negedge clk);
    run(11, 0);
    run(5, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
