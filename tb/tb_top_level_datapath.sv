// tb_top_level_datapath: test of the shared datapath: 19 math units, the
// scratch memory with its controller and the constant memory with its
// controller.
//
// Math units: for random operands one unit at a time is started; the unit
// with that index must answer one cycle later with done and the result of
// its own operator (the operator arithmetic itself is covered by the unit's
// own testbench; here the point is that each slot holds the right operator
// and that no other unit reacts).  Memories: the host fills both memories
// while the decoder is idle (address bit 12 selects the constant memory),
// the decoder side reads both back with one-cycle latency and writes the
// scratch memory, and a host access made while the decoder is busy is held
// until busy drops.  Each case is counted and must occur.
module tb_top_level_datapath;
  import dpr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        busy = 1'b0;
  math_req_t   math_req [NUM_OPS];
  math_rsp_t   math_rsp [NUM_OPS];
  maddr_t      scr_raddr = '0, scr_waddr = '0, cst_addr = '0;
  logic        scr_we = 1'b0;
  mword_t      scr_wdata = '0, scr_rdata, cst_rdata;
  logic        host_req = 1'b0, host_we = 1'b0, host_ack;
  logic [12:0] host_addr = '0;
  mword_t      host_wdata = '0, host_rdata;

  top_level_datapath dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host(input bit we, input logic [12:0] a, input mword_t d,
                      output mword_t q, output int waited);
    @(negedge clk);
    host_req = 1'b1; host_we = we; host_addr = a; host_wdata = d;
    waited = 0;
    #1;
    while (!host_ack) begin
      @(negedge clk);
      waited++;
      #1;
    end
    q = host_rdata;
    @(negedge clk);
    host_req = 1'b0; host_we = 1'b0;
  endtask

  initial begin
    int n_units = 0, n_held = 0, n_scr = 0, n_cst = 0, n_dec_wr = 0;
    mword_t q;
    int w;
    mword_t scr_model [64], cst_model [64];
    for (int i = 0; i < NUM_OPS; i++) math_req[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // math units
    for (int it = 0; it < 3000; it++) begin
      int u;
      math_req_t r;
      op_result_t e;
      u = $urandom_range(0, NUM_OPS - 1);
      r.start = 1'b1;
      r.a = $urandom; r.b = $urandom;
      r.c = 16'($urandom); r.d = 16'($urandom);
      if ($urandom_range(0, 1) != 0) begin     // small shift counts as well
        r.d = 16'($signed($urandom_range(0, 40)) - 20);
        r.b[15:0] = 16'($urandom_range(0, 40));
      end
      @(negedge clk);
      math_req[u] = r;
      @(negedge clk);
      math_req[u].start = 1'b0;
      e = eval_op(op_e'(u), r);
      for (int i = 0; i < NUM_OPS; i++) check(math_rsp[i].done == (i == u), "only the started unit is done");
      check(math_rsp[u].res == e.val && math_rsp[u].overflow == e.ovf,
            $sformatf("unit %0d result", u));
      n_units++;
    end

    // host loads both memories while idle
    for (int k = 0; k < 64; k++) begin
      scr_model[k] = $urandom;
      cst_model[k] = $urandom;
      host(1'b1, 13'(k * 7),          scr_model[k], q, w);
      host(1'b1, 13'h1000 | 13'(k * 5), cst_model[k], q, w);
    end
    for (int k = 0; k < 64; k++) begin
      host(1'b0, 13'(k * 7), '0, q, w);
      check(q == scr_model[k], "host reads scratch back");
      if (q == scr_model[k]) n_scr++;
      host(1'b0, 13'h1000 | 13'(k * 5), '0, q, w);
      check(q == cst_model[k], "host reads constant back");
      if (q == cst_model[k]) n_cst++;
    end

    // decoder side reads and writes while busy
    @(negedge clk) busy = 1'b1;
    for (int k = 0; k < 64; k++) begin
      scr_raddr = maddr_t'(k * 7);
      cst_addr  = maddr_t'(k * 5);
      @(negedge clk);
      check(scr_rdata == scr_model[k], "decoder reads scratch");
      check(cst_rdata == cst_model[k], "decoder reads constant");
      scr_we = 1'b1; scr_waddr = maddr_t'(k * 7); scr_wdata = ~scr_model[k];
      @(negedge clk);
      scr_we = 1'b0;
      scr_model[k] = ~scr_model[k];
      n_dec_wr++;
    end

    // a host read while busy is held until busy drops
    fork
      begin
        host(1'b0, 13'(3 * 7), '0, q, w);
        check(q == scr_model[3], "held host read returns the word");
        check(w >= 30, "host held while busy");
        if (w >= 30) n_held++;
      end
      begin
        repeat (30) @(negedge clk);
        busy = 1'b0;
      end
    join
    for (int k = 0; k < 64; k++) begin
      host(1'b0, 13'(k * 7), '0, q, w);
      check(q == scr_model[k], "host sees decoder writes");
    end

    check(n_units > 0 && n_scr > 0 && n_cst > 0 && n_dec_wr > 0 && n_held > 0,
          "all datapath cases happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
