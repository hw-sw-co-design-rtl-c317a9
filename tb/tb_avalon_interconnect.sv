// tb_avalon_interconnect: the fabric with the real dual-port memory behind it
// and a register model on the register side. Checks address decoding (memory
// window versus register window), one-cycle read latency with readdatavalid
// steered to the right master, host priority with waitrequest to the read
// master on a port-A collision and to the write master on a port-B collision,
// and byte-enabled writes by the write master.
module tb_avalon_interconnect;
  import he_pkg::*;
  logic clk = 0, rst_n = 0;
  avm_req_t host_req, rm_req, wm_req;
  avm_rsp_t host_rsp, rm_rsp, wm_rsp;
  logic mem_a_rd, mem_a_wr, mem_b_rd, mem_b_wr;
  logic [MEM_AW-1:0] mem_a_addr, mem_b_addr;
  logic [3:0] mem_a_be, mem_b_be;
  word_t mem_a_wdata, mem_a_rdata, mem_b_wdata, mem_b_rdata;
  logic reg_rd, reg_wr;
  logic [3:0] reg_addr;
  word_t reg_wdata, reg_rdata;
  word_t regs [16];
  int checks = 0, failures = 0, rm_waits = 0, wm_waits = 0;

  avalon_interconnect dut (.*);
  onchip_memory u_mem (.clk,
    .a_rd(mem_a_rd), .a_wr(mem_a_wr), .a_addr(mem_a_addr), .a_be(mem_a_be),
    .a_wdata(mem_a_wdata), .a_rdata(mem_a_rdata),
    .b_rd(mem_b_rd), .b_wr(mem_b_wr), .b_addr(mem_b_addr), .b_be(mem_b_be),
    .b_wdata(mem_b_wdata), .b_rdata(mem_b_rdata));

  // register model with one-cycle read latency
  always_ff @(posedge clk) begin
    if (reg_wr) regs[reg_addr] <= reg_wdata;
    if (reg_rd) reg_rdata <= regs[reg_addr];
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic host_write(input int a, input word_t d, input logic [3:0] be = 4'hf);
    @(negedge clk);
    host_req = AVM_REQ_IDLE; host_req.write = 1; host_req.address = addr_t'(a);
    host_req.writedata = d; host_req.byteenable = be;
    check(!host_rsp.waitrequest, "host never waits");
    @(negedge clk) host_req = AVM_REQ_IDLE;
  endtask

  task automatic host_read(input int a, output word_t d);
    @(negedge clk);
    host_req = AVM_REQ_IDLE; host_req.read = 1; host_req.address = addr_t'(a);
    @(negedge clk) host_req = AVM_REQ_IDLE;
    check(host_rsp.readdatavalid, "host readdatavalid after one cycle");
    d = host_rsp.readdata;
  endtask

  initial begin
    word_t d;
    host_req = AVM_REQ_IDLE; rm_req = AVM_REQ_IDLE; wm_req = AVM_REQ_IDLE;
    for (int i = 0; i < 16; i++) regs[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // memory and register windows
    host_write(5, 32'h11223344);
    host_write(32'h1FFFF, 32'hCAFEF00D);
    host_write(32'h20003, 32'h0000ABCD);
    check(regs[3] == 32'hABCD, "register write decoded");
    host_read(5, d);        check(d == 32'h11223344, "memory read back");
    host_read(32'h1FFFF, d); check(d == 32'hCAFEF00D, "last memory word");
    host_read(32'h20003, d); check(d == 32'hABCD, "register read back");
    host_write(5, 32'h000000EE, 4'b0001);
    host_read(5, d);        check(d == 32'h112233EE, "byte enable");
    // read master alone: one read per cycle, data one cycle later
    @(negedge clk);
    rm_req.read = 1; rm_req.address = 5;
    #1;
    check(!rm_rsp.waitrequest, "rm granted when host idle");
    @(negedge clk);
    rm_req.address = 32'h1FFFF;
    check(rm_rsp.readdatavalid && rm_rsp.readdata == 32'h112233EE, "rm data 1");
    // host read collides with read master on port A
    host_req.read = 1; host_req.address = 5;
    #1;
    check(rm_rsp.waitrequest, "rm waits on host read");
    if (rm_rsp.waitrequest) rm_waits++;
    @(negedge clk);
    host_req = AVM_REQ_IDLE;
    check(host_rsp.readdatavalid && !rm_rsp.readdatavalid && host_rsp.readdata == 32'h112233EE,
          "host gets its data, rm gets none");
    #1;
    check(!rm_rsp.waitrequest, "rm resumes");
    @(negedge clk);
    rm_req = AVM_REQ_IDLE;
    check(rm_rsp.readdatavalid && rm_rsp.readdata == 32'hCAFEF00D && !host_rsp.readdatavalid,
          "rm data 2");
    // write master collides with a host write on port B
    @(negedge clk);
    wm_req.write = 1; wm_req.address = 100; wm_req.writedata = 32'hA5A5A5A5; wm_req.byteenable = 4'b0110;
    host_req.write = 1; host_req.address = 101; host_req.writedata = 32'h12345678; host_req.byteenable = 4'hf;
    #1;
    check(wm_rsp.waitrequest, "wm waits on host write");
    if (wm_rsp.waitrequest) wm_waits++;
    @(negedge clk);
    host_req = AVM_REQ_IDLE;
    #1;
    check(!wm_rsp.waitrequest, "wm resumes");
    @(negedge clk);
    wm_req = AVM_REQ_IDLE;
    host_read(100, d); check(d[23:8] == 16'hA5A5, "wm byte-enabled write");
    host_read(101, d); check(d == 32'h12345678, "host write during wm");
    // a read master read and a write master write in the same cycle
    @(negedge clk);
    rm_req.read = 1; rm_req.address = 101;
    wm_req.write = 1; wm_req.address = 102; wm_req.writedata = 32'h0BADBEEF; wm_req.byteenable = 4'hf;
    #1;
    check(!rm_rsp.waitrequest && !wm_rsp.waitrequest, "both DMA ports at once");
    @(negedge clk);
    rm_req = AVM_REQ_IDLE; wm_req = AVM_REQ_IDLE;
    check(rm_rsp.readdata == 32'h12345678, "rm data 3");
    host_read(102, d); check(d == 32'h0BADBEEF, "wm write landed");
    check(rm_waits > 0 && wm_waits > 0, "both collisions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
