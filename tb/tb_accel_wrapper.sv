// tb_accel_wrapper: end-to-end test of the whole accelerator through the
// host port, playing the role of the PCIe bridge and the host software.
// For each image it writes the packed pixels into memory, programs the
// registers (source, target, length, height, width, command, start), polls
// the status register, then reads the result back and compares every byte
// with the reference equalization. It checks the process-time register
// against 2*M*N + 552 cycles (plus at most 40 cycles of pipeline fill) on a
// run without host traffic, runs one image in place (target = source), one
// with host memory traffic during the run so that the read master and the
// write master both meet waitrequest and the accelerator is paused through
// `write_full`, and one start with a bad command, which must be refused.
// Each of these mechanisms is counted and must have happened.
module tb_accel_wrapper;
  import he_pkg::*;
  import he_ref_pkg::*;
  localparam int NRUN = 3;
  localparam int H [NRUN] = '{30, 17, 24};
  localparam int WD[NRUN] = '{40, 21, 32};
  localparam int MAX_CYCLES = 400000;

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
    word_t st;
    host_req = AVM_REQ_IDLE;
    repeat (3) @(posedge clk); rst_n = 1;
    // the histogram memories are swept clear after reset
    while (busy) @(negedge clk);
    run_image(H[0], WD[0], 0, 0, 0, 1, 1);            // in place, quiet bus
    run_image(H[1], WD[1], 100, 5000, 1, 0, 2);       // separate target, host traffic
    run_image(H[2], WD[2], 7, 7, 1, 0, 3);            // in place, host traffic
    // a bad command must be refused
    host_write(32'h20005, 3);
    host_write(32'h20006, 1);
    host_read(32'h20008, st);
    check(st[ST_ERROR] && !st[ST_BUSY] && !busy, "bad command refused");
    if (st[ST_ERROR]) n_refused++;
    $display("mechanisms: rm waits %0d, wm waits %0d, write_full %0d, done %0d, refused %0d, in place %0d",
             n_rm_wait, n_wm_wait, n_full, n_done, n_refused, n_inplace);
    check(n_rm_wait > 0, "read master waited");
    check(n_wm_wait > 0, "write master waited");
    check(n_full > 0, "accelerator paused by write_full");
    check(n_done == NRUN, "one done per run");
    check(n_refused == 1, "bad configuration refused");
    check(n_inplace == 2, "in-place runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
