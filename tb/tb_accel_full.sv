// tb_accel_full: the whole accelerator at its default sizes (512 KiB image
// memory, 18-bit pixel counts, 40-step divider) running the four image sizes
// of the evaluation: 400x300, 320x240, 160x240 and 80x60 pixels, 24 bits per
// pixel, each processed in place at word 0 as the host software does. Every
// result byte is compared with the reference equalization, and the
// process-time register must read 2*M*N + 552 cycles plus at most 40 cycles
// of pipeline fill. At 125 MHz, 400x300 then takes about 1.92 ms.
module tb_accel_full;
  import he_pkg::*;
  import he_ref_pkg::*;
  localparam int NRUN = 4;
  localparam int H [NRUN] = '{300, 240, 240, 60};
  localparam int WD[NRUN] = '{400, 320, 160, 80};
  localparam int MAX_CYCLES = 3000000;

  logic clk = 0, rst_n = 0;
  avm_req_t host_req;
  avm_rsp_t host_rsp;
  logic busy, done;
  int checks = 0, failures = 0;
  int n_rm_wait = 0, n_wm_wait = 0, n_full = 0, n_done = 0, n_refused = 0, n_inplace = 0;

  accel_wrapper dut (.*);

  always #4 clk = ~clk;   // 125 MHz

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, sampled inside the wrapper.
  always @(negedge clk) if (rst_n) begin
    if (dut.rm_req.read && dut.rm_rsp.waitrequest) n_rm_wait++;
    if (dut.wm_req.write && dut.wm_rsp.waitrequest) n_wm_wait++;
    if (dut.write_full && dut.u_core.state == dut.u_core.SCAN) n_full++;
    if (done) n_done++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic host_write(input int a, input word_t d, input logic [3:0] be = 4'hf);
    @(negedge clk);
    host_req = AVM_REQ_IDLE; host_req.write = 1; host_req.address = addr_t'(a);
    host_req.writedata = d; host_req.byteenable = be;
    @(negedge clk) host_req = AVM_REQ_IDLE;
  endtask

  task automatic host_read(input int a, output word_t d);
    @(negedge clk);
    host_req = AVM_REQ_IDLE; host_req.read = 1; host_req.address = addr_t'(a);
    @(negedge clk) host_req = AVM_REQ_IDLE;
    d = host_rsp.readdata;
  endtask

  // One complete operation as the host software performs it.
  task automatic run_image(input int h, input int w, input int src, input int dst,
                           input bit traffic, input bit check_time, input int seed);
    bit [7:0] img [];
    bit [7:0] t [256];
    int npix, nw;
    word_t d, st;
    npix = h * w;
    nw = words_for(npix);
    make_bright_image(img, npix, seed);
    ref_table(img, npix, t);
    // the bytes after the image in its last word are marked, in both images
    host_write(dst + nw - 1, 32'hEEEEEEEE, 4'hf);
    for (int i = 0; i < nw; i++) begin
      d = 32'hEEEEEEEE;
      for (int k = 0; k < 4; k++) if (4 * i + k < 3 * npix) d[8*k +: 8] = img[4 * i + k];
      host_write(src + i, d);
    end
    host_write(32'h20000, src);
    host_write(32'h20001, dst);
    host_write(32'h20002, nw);
    host_write(32'h20003, h);
    host_write(32'h20004, w);
    host_write(32'h20005, 1);
    host_write(32'h20006, 1);
    st = 1;
    while (st[ST_BUSY]) begin
      if (traffic) begin
        host_read(32'h1FF00, d);            // port A, collides with the read master
        host_write(32'h1FF01, 32'h1234);    // port B, collides with the write master
        host_write(32'h1FF02, 32'h5678);
        host_write(32'h1FF03, 32'h9ABC);
      end
      host_read(32'h20008, st);
    end
    check(st[ST_DONE] && !st[ST_ERROR], "status done");
    host_read(32'h20007, d);
    $display("%0dx%0d: process time %0d cycles, 2*M*N+552 = %0d", h, w, d, 2 * npix + 552);
    if (check_time)
      check(int'(d) >= 2 * npix + 552 && int'(d) <= 2 * npix + 552 + 40, "process time");
    for (int i = 0; i < nw; i++) begin
      host_read(dst + i, d);
      for (int k = 0; k < 4; k++) begin
        int b;
        b = 4 * i + k;
        checks++;
        if (b < 3 * npix ? d[8*k +: 8] != t[img[b]] : d[8*k +: 8] != 8'hEE) begin
          failures++;
          if (failures < 10) $display("byte %0d: %h expected %h", b, d[8*k +: 8],
                                      b < 3 * npix ? t[img[b]] : 8'hEE);
        end
      end
    end
    if (src == dst) n_inplace++;
  endtask

  initial begin
    host_req = AVM_REQ_IDLE;
    repeat (3) @(posedge clk); rst_n = 1;
    // the histogram memories are swept clear after reset
    while (busy) @(negedge clk);
    for (int r = 0; r < NRUN; r++) run_image(H[r], WD[r], 0, 0, 0, 1, r + 1);
    check(n_done == NRUN, "one done per run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
