// tb_g729_decoder_periph: end-to-end test of the whole design through its
// bus interface, driven the way the host test program drives it.
//
// For each frame the host model writes the 80 serial words into decoder
// memory, clears start, sets continue, clears rm_ready, pulses start and
// then polls: whenever rm_load differs from rm_ready it blanks the
// partition, waits a reconfiguration time, loads the requested module into
// the partition (icap_rm_id) and writes rm_ready; it stops when done reads
// one.  It then reads parm[0..11] back and compares them with the values
// computed from the frame bits: erasure flag, the 11 fields, and the
// parity check result in parm[4].  Status registers are checked as well.
//
// Every mechanism of the design is made to happen and counted: stalls in
// the wait-for-ready states, a reconfiguration hidden behind the static
// work, a pause state held while continue is low, a host memory access held
// off during decoding, a frame erasure, a parity error, done held high in
// idle, a byte-enable-masked register write and the constant memory path.
// A mechanism that never happened counts as a failure.
//
// Twelve frames use short reconfiguration times (40 and 900 cycles) so that
// both the hidden and the stalling case occur; the thirteenth uses the
// measured partial reconfiguration time of 101.13 ms at 100 MHz, so that
// frame takes about 20.2 million cycles.  The top is used with its default
// configuration.  Register accesses are acknowledged in the cycle they are
// presented; memory accesses wait for the memory controller.
module tb_g729_decoder_periph;
  import dpr_pkg::*;
  import g729_ref_pkg::*;

  logic clk = 1'b0;
  logic rstn = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] Bus2IP_Addr = '0, Bus2IP_Data = '0, Bus2IP_RdCE = '0, Bus2IP_WrCE = '0;
  logic        Bus2IP_CS = 1'b0, Bus2IP_RNW = 1'b1;
  logic [3:0]  Bus2IP_BE = 4'hF;
  logic [31:0] IP2Bus_Data;
  logic        IP2Bus_RdAck, IP2Bus_WrAck, IP2Bus_Error;
  rm_id_t      icap_rm_id = RM_NONE;

  g729_decoder_periph dut (
    .Bus2IP_Clk(clk), .Bus2IP_Resetn(rstn), .Bus2IP_Addr(Bus2IP_Addr), .Bus2IP_CS(Bus2IP_CS),
    .Bus2IP_RNW(Bus2IP_RNW), .Bus2IP_Data(Bus2IP_Data), .Bus2IP_BE(Bus2IP_BE),
    .Bus2IP_RdCE(Bus2IP_RdCE), .Bus2IP_WrCE(Bus2IP_WrCE), .IP2Bus_Data(IP2Bus_Data),
    .IP2Bus_RdAck(IP2Bus_RdAck), .IP2Bus_WrAck(IP2Bus_WrAck), .IP2Bus_Error(IP2Bus_Error),
    .icap_rm_id(icap_rm_id)
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (25_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cycle, what);
    end
  endtask

  // ------------------------------------------------------------ bus model
  task automatic reg_write(input int idx, input logic [31:0] d, input logic [3:0] be = 4'hF);
    @(negedge clk);
    Bus2IP_WrCE = 32'd1 << idx; Bus2IP_Data = d; Bus2IP_BE = be; Bus2IP_RNW = 1'b0;
    #1;
    check(IP2Bus_WrAck === 1'b1, "register write acknowledged");
    @(negedge clk);
    Bus2IP_WrCE = '0; Bus2IP_BE = 4'hF; Bus2IP_RNW = 1'b1;
  endtask

  task automatic reg_read(input int idx, output logic [31:0] d);
    @(negedge clk);
    Bus2IP_RdCE = 32'd1 << idx; Bus2IP_RNW = 1'b1;
    #1;
    d = IP2Bus_Data;
    if (IP2Bus_RdAck !== 1'b1) check(1'b0, "register read acknowledged");
    @(negedge clk);
    Bus2IP_RdCE = '0;
  endtask

  task automatic mem_access(input bit wr, input int word, input logic [31:0] d,
                            output logic [31:0] q, output int waited);
    @(negedge clk);
    Bus2IP_CS = 1'b1; Bus2IP_RNW = !wr; Bus2IP_Addr = 32'(word) << 2; Bus2IP_Data = d;
    waited = 0;
    forever begin
      #1;
      if (wr ? IP2Bus_WrAck : IP2Bus_RdAck) break;
      @(negedge clk);
      waited++;
    end
    q = IP2Bus_Data;
    @(negedge clk);
    Bus2IP_CS = 1'b0; Bus2IP_RNW = 1'b1;
  endtask

  task automatic mem_write(input int word, input logic [31:0] d);
    logic [31:0] q; int w;
    mem_access(1'b1, word, d, q, w);
  endtask

  task automatic mem_read(input int word, output logic [31:0] q);
    int w;
    mem_access(1'b0, word, '0, q, w);
  endtask

  // ------------------------------------------------------ mechanism counts
  int n_wait_stall = 0;      // cycles spent waiting for rm_ready
  int n_hidden = 0;          // reconfigurations finished before the wait state
  int n_pause_hold = 0;      // cycles held in a pause state by continue low
  int n_host_held = 0;       // host memory accesses held off while busy
  int n_erasure = 0, n_parity_err = 0, n_parity_ok = 0;
  int n_done_held = 0, n_be_masked = 0, n_const = 0, n_reconfig = 0;

  // the control state is read through the state register (18):
  // 2 and 10 are the pause states, 3 and 11 the wait-for-ready states
  task automatic read_state(output logic [31:0] st);
    reg_read(18, st);
    if (st == 3 || st == 11) n_wait_stall++;
  endtask

  int reconfig_cycles;

  // host program: reconfigure the partition on request until done
  // With probe_hold set, a memory read is issued as soon as the last module
  // is ready, while the decoder still owns the memories; it must be held
  // off until the frame is done and then return the first serial word.
  task automatic decode_frame(input bit hold_continue, input bit probe_hold,
                              input logic [31:0] first_word);
    logic [31:0] ready, load, done, q, st;
    int w;
    reg_write(0, 32'd1);
    reg_write(0, 32'd0);
    if (hold_continue) begin
      repeat (50) @(negedge clk);
      read_state(st);
      check(st == 2, "held in the first pause state while continue is low");
      if (st == 2) n_pause_hold++;
      reg_write(4, 32'd1);
    end
    do begin
      reg_read(2, ready);
      reg_read(3, load);
      if (ready != load) begin
        if (load <= 3) begin
          icap_rm_id = RM_NONE;                   // partition being rewritten
          repeat (reconfig_cycles) @(negedge clk);
          icap_rm_id = rm_id_t'(load);
          n_reconfig++;
          read_state(st);
          if (load == 32'(RM_B3) && st < 11) n_hidden++;
        end
        reg_write(2, load);
        if (probe_hold && load == 32'(RM_B3)) begin
          mem_access(1'b0, SERIAL_OFFSET, '0, q, w);
          check(q == first_word, "held host read returns the right word");
          reg_read(1, done);
          check(done == 1, "held host read completes only after done");
          if (w > 10 && done == 1) n_host_held++;
        end
      end
      read_state(st);
      reg_read(1, done);
    end while (done != 1);
  endtask

  initial begin
    logic [31:0] q;
    repeat (4) @(posedge clk);
    rstn = 1'b1;
    repeat (2) @(posedge clk);

    // done is high out of reset; a write with no byte enabled changes nothing
    reg_read(1, q);  check(q == 1, "done high after reset");
    reg_write(4, 32'd1, 4'b0000);
    reg_read(4, q);  check(q == 0, "byte-enable masked write ignored");
    if (q == 0) n_be_masked++;

    // constant memory window: load and read back a few words
    for (int i = 0; i < 16; i++) mem_write(4096 + i, 32'h1000_0000 + 32'(i * 3));
    for (int i = 0; i < 16; i++) begin
      mem_read(4096 + i, q);
      check(q == 32'h1000_0000 + 32'(i * 3), "constant memory read back");
      if (q == 32'h1000_0000 + 32'(i * 3)) n_const++;
    end

    for (int f = 0; f < 13; f++) begin
      bit b [80];
      logic [31:0] words [80];
      bit erased;
      int p1, p0, exp_flag, t0;
      erased = (f % 4 == 3);
      for (int k = 0; k < 80; k++) begin
        b[k] = 1'($urandom);
        words[k] = bit_word(b[k]);
      end
      if (f == 1) begin                  // force a parity error and a clean frame
        b[26] = 1'b1; b[27] = 1'b0; b[28] = 1'b0; b[29] = 1'b0;
        b[30] = 1'b0; b[31] = 1'b0; b[34] = 1'b1;   // bits 7..2 of P1 one 1, P0 = 1: ok
      end
      if (f == 2) begin
        b[26] = 1'b1; b[27] = 1'b1; b[28] = 1'b0; b[29] = 1'b0;
        b[30] = 1'b0; b[31] = 1'b0; b[34] = 1'b1;   // two ones, P0 = 1: error
      end
      for (int k = 0; k < 80; k++) words[k] = bit_word(b[k]);
      if (erased) begin
        int z;
        z = $urandom_range(0, 79);
        words[z] = 32'd0;
        b[z] = 1'b0;
      end
      for (int k = 0; k < 80; k++) mem_write(SERIAL_OFFSET + k, words[k]);

      reg_write(0, 32'd0);
      reg_write(4, (f == 5) ? 32'd0 : 32'd1);
      reg_write(2, 32'd0);
      // the last frame uses the measured partial reconfiguration time,
      // 101.13 ms at the 100 MHz platform clock
      reconfig_cycles = (f == 12) ? 10_113_000 : (f % 2 == 0) ? 40 : 900;
      t0 = int'(cycle);

      decode_frame(f == 5, f == 6, words[0]);

      // results
      p1 = field_value(b, 2);
      p0 = field_value(b, 3);
      exp_flag = parity_flag(p1, p0);
      mem_read(PARM_OFFSET, q);
      check(q == 32'(erased), $sformatf("frame %0d erasure flag %0d", f, q));
      if (q == 1) n_erasure++;
      for (int i = 0; i < PRM_SIZE; i++) begin
        int e;
        e = (i == 3) ? exp_flag : field_value(b, i);
        mem_read(PARM_OFFSET + 1 + i, q);
        check(q == 32'(e), $sformatf("frame %0d parm[%0d] = %0d expected %0d", f, i + 1, q, e));
      end
      if (exp_flag) n_parity_err++; else n_parity_ok++;
      reg_read(8, q);  check(q == 1, "bits2prm_ld8k done flag");
      reg_read(5, q);  check(q == 1, "CheckParityPitch done flag");
      reg_read(3, q);  check(q == 32'(RM_B3), "rm_load names b3 at the end");
      reg_read(18, q); check(q == 0, "state idle");
      reg_read(19, q); check(q == 32'(RM_B3), "port abstraction selects b3");
      reg_read(20, q); check(q == 32'(exp_flag), "debug word is the last decoder write");
      reg_read(6, q);  check(q == 0, "flag of a function not in this build reads 0");
      // done stays high while idle
      repeat (200) @(negedge clk);
      reg_read(1, q);  check(q == 1, "done held high in idle");
      if (q == 1) n_done_held++;
      check(int'(cycle) - t0 > 2 * reconfig_cycles, "frame time covers both reconfigurations");
      // with the measured reconfiguration time a frame should take close to
      // the measured 203.49 ms per frame (20,349,000 cycles); the model has
      // no software overhead, so allow 2 %
      if (f == 12)
        check((int'(cycle) - t0) > 19_942_000 && (int'(cycle) - t0) < 20_756_000,
              "frame time with measured reconfiguration within 2 % of 203.49 ms");
      $display("frame %0d: %0d cycles, reconfiguration %0d cycles", f, int'(cycle) - t0, reconfig_cycles);
    end

    check(n_reconfig >= 24, $sformatf("reconfigurations: %0d", n_reconfig));
    check(n_wait_stall > 0,  "stall waiting for rm_ready happened");
    check(n_hidden > 0,      "reconfiguration hidden behind static work happened");
    check(n_pause_hold > 0,  "pause state held by continue low happened");
    check(n_host_held > 0,   "host access held off while busy happened");
    check(n_erasure > 0,     "frame erasure happened");
    check(n_parity_err > 0 && n_parity_ok > 0, "parity error and clean parity both happened");
    check(n_done_held > 0,   "done held in idle happened");
    check(n_be_masked > 0,   "byte-enable masked write happened");
    check(n_const > 0,       "constant memory access happened");
    $display("stall cycles %0d, hidden reconfigurations %0d, pause-hold cycles %0d, held host accesses %0d",
             n_wait_stall, n_hidden, n_pause_hold, n_host_held);
    $display("erasures %0d, parity errors %0d, clean %0d, reconfigurations %0d",
             n_erasure, n_parity_err, n_parity_ok, n_reconfig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
