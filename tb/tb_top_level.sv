// tb_top_level: test of the complete decoder core (control side plus
// datapath) through its direct ports, without the bus peripheral.
//
// The host model loads the 80 serial words of a random frame through the
// host memory port, pulses start, and answers each rm_load change by
// blanking the partition (cfg_id = 0), waiting a random reconfiguration
// time, loading the module and raising rm_ready.  After done it reads the
// parameters back through the host port and compares them with the values
// computed from the frame bits.  Also checked: dbg_wdata holds the last
// word the decoder wrote (the parity flag), a host access while busy is
// held until done, the constant memory window (address bit 12) is
// separate from the scratch memory, and a pause state holds while continue
// is low.  Each mechanism is counted and must occur.
module tb_top_level;
  import dpr_pkg::*;
  import g729_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start = 1'b0, cont = 1'b1, done, rm_done;
  rm_id_t      rm_ready = RM_NONE, cfg_id = RM_NONE, rm_load, mux_sel;
  logic [7:0]  out_state;
  mword_t      dbg_wdata;
  logic        host_req = 1'b0, host_we = 1'b0, host_ack;
  logic [12:0] host_addr = '0;
  mword_t      host_wdata = '0, host_rdata;

  top_level dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    #50_000_000;
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

  int reconf_delay = 10, n_reconf = 0;
  always @(posedge clk) begin
    if (rst_n && rm_load != rm_ready && rm_load != RM_NONE && !done) begin
      rm_id_t want;
      want = rm_load;
      cfg_id <= RM_NONE;
      repeat (reconf_delay) @(posedge clk);
      cfg_id <= want;
      @(posedge clk);
      rm_ready <= want;
      n_reconf++;
      @(posedge clk);
    end
  end

  int n_pause = 0;
  always @(posedge clk) if (rst_n && (out_state == 8'd2 || out_state == 8'd10) && !cont) n_pause++;

  initial begin
    int n_held = 0, n_dbg = 0, n_cst = 0, n_erased = 0;
    mword_t q;
    int w;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // constant window is its own memory
    host(1'b1, 13'h1000 | 13'(SERIAL_OFFSET), 32'hC0DE_0001, q, w);
    host(1'b1, 13'(SERIAL_OFFSET), 32'h0000_5555, q, w);
    host(1'b0, 13'h1000 | 13'(SERIAL_OFFSET), '0, q, w);
    check(q == 32'hC0DE_0001, "constant window separate from scratch");
    if (q == 32'hC0DE_0001) n_cst++;

    for (int f = 0; f < 16; f++) begin
      bit b [80];
      mword_t words [80];
      bit erased;
      int t, flag;
      erased = (f % 4 == 1);
      for (int k = 0; k < 80; k++) begin
        b[k] = 1'($urandom);
        words[k] = bit_word(b[k]);
      end
      if (erased) begin
        int z;
        z = $urandom_range(0, 79);
        words[z] = '0;
        b[z] = 1'b0;
      end
      for (int k = 0; k < 80; k++) host(1'b1, 13'(SERIAL_OFFSET + k), words[k], q, w);
      reconf_delay = (f % 2 == 0) ? 5 : 700;
      cont = (f != 3);
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      if (f == 3) begin
        repeat (30) @(negedge clk);
        check(out_state == 8'd2, "held in pause while continue is low");
        cont = 1'b1;
      end
      if (f == 6) begin
        // read while the decoder runs: held until done
        repeat (5) @(negedge clk);
        host(1'b0, 13'(SERIAL_OFFSET + 1), '0, q, w);
        check(q == words[1] && done, "held host read completes after done");
        if (w > 50) n_held++;
      end
      t = 0;
      while (!done && t < 100_000) begin
        @(negedge clk);
        t++;
      end
      check(done, "frame completes");
      flag = parity_flag(field_value(b, 2), field_value(b, 3));
      host(1'b0, 13'(PARM_OFFSET), '0, q, w);
      check(q == 32'(erased), "erasure flag");
      if (erased && q == 1) n_erased++;
      for (int i = 0; i < PRM_SIZE; i++) begin
        host(1'b0, 13'(PARM_OFFSET + 1 + i), '0, q, w);
        check(q == 32'((i == 3) ? flag : field_value(b, i)), $sformatf("frame %0d parm[%0d]", f, i + 1));
      end
      check(dbg_wdata == 32'(flag), "debug word holds the last decoder write");
      if (dbg_wdata == 32'(flag)) n_dbg++;
      check(mux_sel == RM_B3 && rm_load == RM_B3, "b3 selected at the end of a frame");
      @(negedge clk) rm_ready = RM_NONE;
    end
    check(n_held > 0 && n_dbg > 0 && n_cst > 0 && n_erased > 0 && n_pause > 0 && n_reconf >= 32,
          "all mechanisms happened");
    $display("reconfigurations %0d, held %0d, pause cycles %0d, erased %0d", n_reconf, n_held, n_pause, n_erased);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
