// tb_decoder_ctrl_fsm: self-checking test of the decoder control FSM.
//
// Around the FSM sit three models: a scratch memory holding the 80 serial
// words (one-cycle read latency, like the real memory), a reconfigurable
// module that raises done a random number of cycles after its start pulse,
// and a host that answers each new rm_load by writing rm_ready after a
// random reconfiguration delay.  Each frame checks:
//   - done is high exactly while idle and stays high while idle,
//   - a start level held high does not start a second frame,
//   - the state order LOAD_B1 .. FINISH,
//   - the RM is started only when rm_ready equals rm_load, once per RM,
//   - rm_load moves to b3 in the cycle after b1 reports done,
//   - mem_own is low exactly while an RM runs,
//   - the erasure flag written to parm[0] matches the frame,
//   - pause states hold while continue is low and fall through when high.
// Mechanisms (stall, hidden reconfiguration, pause hold, erasure) are
// counted; one that never happens is a failure.
module tb_decoder_ctrl_fsm;
  import dpr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start = 1'b0, cont = 1'b1;
  rm_id_t     rm_ready = RM_NONE;
  logic       done, busy, rm_start, rm_done = 1'b0, mem_own, mem_we;
  rm_id_t     rm_load;
  logic [7:0] out_state;
  maddr_t     mem_raddr, mem_waddr;
  mword_t     mem_rdata, mem_wdata;

  decoder_ctrl_fsm dut (
    .clk, .rst_n, .start, .cont, .rm_ready, .done, .busy, .rm_load, .out_state,
    .rm_start, .rm_done, .mem_own, .mem_raddr, .mem_rdata, .mem_we, .mem_waddr, .mem_wdata
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // serial word memory model
  mword_t serial [80];
  always_ff @(posedge clk) begin
    if (mem_raddr >= maddr_t'(SERIAL_OFFSET) && mem_raddr < maddr_t'(SERIAL_OFFSET + 80))
      mem_rdata <= serial[mem_raddr - maddr_t'(SERIAL_OFFSET)];
    else
      mem_rdata <= 'x;
  end

  // RM model: done after a random delay following a start pulse
  int rm_delay = 5;
  int n_rm_start = 0;
  always @(posedge clk) begin
    if (rst_n && rm_start) begin
      n_rm_start++;
      check(rm_ready == rm_load, "RM started only when rm_ready == rm_load");
      fork
        begin
          repeat (rm_delay) @(posedge clk);
          rm_done <= 1'b1;
          @(posedge clk);
          rm_done <= 1'b0;
        end
      join_none
    end
  end

  // host model: reconfigure after a delay whenever rm_load changes
  int reconf_delay = 10;
  int n_reconf = 0;
  always @(posedge clk) begin
    if (rst_n && rm_load != rm_ready && rm_load != RM_NONE) begin
      rm_id_t want;
      want = rm_load;
      repeat (reconf_delay) @(posedge clk);
      rm_ready <= want;
      n_reconf++;
      @(posedge clk);
    end
  end

  // cycle-level monitors
  int n_stall = 0, n_pause_hold = 0, n_hidden = 0, n_done_idle = 0;
  int n_we = 0;
  logic last_we_data;
  logic rm_done_q = 1'b0;
  rm_id_t load_q = RM_NONE;
  logic [7:0] st_q = 8'd0;
  logic       wait_ok_q = 1'b0;
  logic [7:0] run_q = 8'd0;
  always @(posedge clk) if (rst_n) begin
    check(done == (out_state == 8'd0), "done high exactly while idle");
    check(busy == !done, "busy is the complement of done");
    check(mem_own == !(out_state inside {8'd4, 8'd5, 8'd12, 8'd13}),
          "mem_own low exactly while an RM runs");
    if (out_state == 8'd0) n_done_idle++;
    if (out_state == 8'd3 || out_state == 8'd11) n_stall++;
    if ((out_state == 8'd2 || out_state == 8'd10) && !cont) n_pause_hold++;
    // no cycle is lost once the module is present: a wait state whose
    // module is ready is left on the next clock edge
    if (wait_ok_q) check(out_state == run_q, "RM started one cycle after rm_ready matches");
    wait_ok_q <= (out_state == 8'd3 && rm_ready == RM_B1) || (out_state == 8'd11 && rm_ready == RM_B3);
    run_q     <= (out_state == 8'd3) ? 8'd4 : 8'd12;
    // hidden: b3 already present on the first cycle of its wait state
    if (out_state == 8'd11 && st_q != 8'd11 && rm_ready == RM_B3) n_hidden++;
    st_q <= out_state;
    if (mem_we) begin
      n_we++;
      check(mem_waddr == maddr_t'(PARM_OFFSET), "erasure flag written to parm[0]");
      last_we_data = mem_wdata[0];
    end
    // rm_load follows b1's done by one state (LOAD_B3)
    if (load_q == RM_B1 && rm_load == RM_B3) check(rm_done_q == 1'b0 && out_state == 8'd7,
          "rm_load moves to b3 right after b1 completes");
    rm_done_q <= rm_done;
    load_q <= rm_load;
  end

  // expected state order of one frame (repeats allowed)
  logic [7:0] order [15] = '{8'd0, 8'd1, 8'd2, 8'd3, 8'd4, 8'd5, 8'd6, 8'd7, 8'd8,
                             8'd9, 8'd10, 8'd11, 8'd12, 8'd13, 8'd14};
  int pos = 0;
  bit order_ok = 1'b1;
  logic [7:0] prev_state = 8'd0;
  always @(posedge clk) if (rst_n) begin
    if (out_state != prev_state) begin
      // the erasure scan loops ERASE_ADR/ERASE_CHK; the frame wraps to idle
      if (out_state == 8'd7 && prev_state == 8'd8) pos = 7;
      else if (out_state == 8'd0 && prev_state == 8'd14) pos = 0;
      else if (pos + 1 < 15 && out_state == order[pos + 1]) pos++;
      else begin
        order_ok = 1'b0;
        $display("bad transition %0d -> %0d", prev_state, out_state);
      end
      prev_state = out_state;
    end
  end

  initial begin
    int n_erased = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);
    check(done === 1'b1 && rm_load == RM_NONE, "idle with no load request after reset");

    for (int f = 0; f < 40; f++) begin
      bit erased;
      int t, rm_before;
      erased = ($urandom_range(0, 2) == 0);
      for (int k = 0; k < 80; k++) serial[k] = ($urandom_range(0, 1) != 0) ? 32'h81 : 32'h7F;
      if (erased) serial[$urandom_range(0, 79)] = 32'd0;
      rm_delay     = $urandom_range(1, 60);
      reconf_delay = $urandom_range(1, 300);
      cont <= (f % 5 != 2);
      rm_before = n_rm_start;

      @(posedge clk) start <= 1'b1;
      repeat (2) @(posedge clk);
      check(done == 1'b0, "done drops after a start edge");
      if (f % 5 == 2) begin
        repeat (40) @(posedge clk);
        check(out_state == 8'd2, "held in pause 1 while continue is low");
        cont <= 1'b1;
        @(posedge clk);
        wait (out_state == 8'd10);
        cont <= 1'b0;
        repeat (20) @(posedge clk);
        check(out_state == 8'd10, "held in pause 2 while continue is low");
        cont <= 1'b1;
      end
      t = 0;
      while (!done && t < 100_000) begin
        @(posedge clk);
        t++;
      end
      check(done == 1'b1, "frame completes");
      check(n_rm_start - rm_before == 2, "each RM started once per frame");
      check(last_we_data == erased, $sformatf("frame %0d erasure flag", f));
      if (erased && last_we_data) n_erased++;
      // start still high: no new frame; done remains high
      repeat (30) @(posedge clk);
      check(done == 1'b1 && out_state == 8'd0, "level start does not restart; done held");
      start <= 1'b0;
      rm_ready <= RM_NONE;   // host clears ready between frames
      repeat (3) @(posedge clk);
    end

    check(order_ok, "state order");
    check(n_we == 40, "one erasure write per frame");
    check(n_stall > 0, "stall in a wait state happened");
    check(n_hidden > 0, "hidden reconfiguration happened");
    check(n_pause_hold > 0, "pause hold happened");
    check(n_erased > 0, "erasure happened");
    check(n_done_idle > 0, "done held in idle happened");
    $display("stall %0d, hidden %0d, pause hold %0d, erased %0d, reconfigurations %0d",
             n_stall, n_hidden, n_pause_hold, n_erased, n_reconf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
