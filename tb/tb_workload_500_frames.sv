// tb_workload_500_frames: the timing run of the decoder, 500 consecutive
// frames through the bus peripheral, as the processor test program runs it.
//
// Each frame gets fresh random bits (every fifth frame has one all-zero
// word, an erasure).  The processor model loads the frame, starts the
// decoder, answers both load requests with a reconfiguration of random
// length (20 to 400 cycles, far shorter than on the FPGA so that 500
// frames can be simulated) and polls done.  After every frame all 12
// parameter words are read back and compared with the values computed from
// the frame bits, so frames must not disturb each other.  The testbench
// reports the frame time outside the two reconfigurations (from the start
// write to done, less the time the processor spends reconfiguring) as
// minimum, maximum and mean, and checks that it stays below one 10 ms frame
// period at 100 MHz.  Because the erasure scan overlaps the second
// reconfiguration, this is less than the decoder's total busy time.  It
// counts stalls, hidden
// reconfigurations, erasures and parity errors, each of which must occur.
module tb_workload_500_frames;
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
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at cycle %0d: %s", cycle, what);
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

  int n_stall = 0, n_hidden = 0, n_erasure = 0, n_parity_err = 0;

  initial begin
    logic [31:0] q, ready, load, done, st;
    longint own_min = 64'h7fff_ffff, own_max = 0, own_sum = 0;
    repeat (4) @(posedge clk);
    rstn = 1'b1;
    repeat (2) @(posedge clk);
    for (int f = 0; f < 500; f++) begin
      bit b [80];
      logic [31:0] words [80];
      bit erased;
      int flag, t0, rc_total;
      erased = (f % 5 == 4);
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
      for (int k = 0; k < 80; k++) mem_write(SERIAL_OFFSET + k, words[k]);
      reg_write(0, 32'd0);
      reg_write(4, 32'd1);
      reg_write(2, 32'd0);
      t0 = int'(cycle);
      rc_total = 0;
      reg_write(0, 32'd1);
      reg_write(0, 32'd0);
      do begin
        reg_read(2, ready);
        reg_read(3, load);
        if (ready != load) begin
          if (load <= 3) begin
            int rc;
            rc = $urandom_range(20, 400);
            icap_rm_id = RM_NONE;
            repeat (rc) @(negedge clk);
            rc_total += rc;
            icap_rm_id = rm_id_t'(load);
            reg_read(18, st);
            if (load == 32'(RM_B3) && st < 11) n_hidden++;
          end
          reg_write(2, load);
        end
        reg_read(18, st);
        if (st == 3 || st == 11) n_stall++;
        reg_read(1, done);
      end while (done != 1);
      begin
        longint own;
        own = longint'(int'(cycle) - t0 - rc_total);
        if (own < own_min) own_min = own;
        if (own > own_max) own_max = own;
        own_sum += own;
      end
      flag = parity_flag(field_value(b, 2), field_value(b, 3));
      mem_read(PARM_OFFSET, q);
      check(q == 32'(erased), $sformatf("frame %0d erasure flag", f));
      if (erased && q == 1) n_erasure++;
      for (int i = 0; i < PRM_SIZE; i++) begin
        mem_read(PARM_OFFSET + 1 + i, q);
        check(q == 32'((i == 3) ? flag : field_value(b, i)), $sformatf("frame %0d parm[%0d]", f, i + 1));
      end
      if (flag) n_parity_err++;
    end
    check(own_max < 1_000_000, "time outside reconfiguration below one 10 ms period at 100 MHz");
    check(n_stall > 0 && n_hidden > 0 && n_erasure > 0 && n_parity_err > 0, "all mechanisms happened");
    $display("500 frames: time outside reconfiguration per frame min %0d, max %0d, mean %0d cycles",
             own_min, own_max, own_sum / 500);
    $display("stall polls %0d, hidden reconfigurations %0d, erasures %0d, parity errors %0d",
             n_stall, n_hidden, n_erasure, n_parity_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
