// tb_dwg_top: end-to-end test of the four designs in dwg_top, all at their
// default sizes, each on its own clock.
//
//  * original voice: divisor 5, shape 1, then a shape switch; the wave point
//    must advance every 5 clocks and wrap after 256 points.
//  * top octave: the twelve generators get the C8..B8 divisors for a
//    14417920 Hz master clock (3444 ... 1825); each note tick must come
//    every N clocks. A behavioural stand-in for the x256 PLLs makes 256
//    pulses per note period (a fractional accumulator), and the voice,
//    set to A8 (divisor 2048, so a pulse every 8 clocks) with N = 1 and
//    then N = 2 (one octave down), must step its wave every 8 and 16 clocks.
//  * multi-channel DDS: 4 channels (4x256 table) and then 16 channels
//    (16x64 table) with the frame model of tb_mcdds.
//  * 16-channel FPGA DDS: DAC against a reference of the sixteen phases.
// Each mechanism is counted: divider reload, 256-point wrap, shape switch,
// top-octave clock selection, octave division, phase write-back, sum
// restart by the 2:1 mux, latch 6 load, lookup-table split mode, and the
// adder tree; one that never happens counts as a failure.
module tb_dwg_top
  import dwg_pkg::*;
;
  int checks = 0, failures = 0;
  logic rst_n;
  logic clk_dwg = 0, clk_to = 0, clk_mcdds = 0, clk_dds16 = 0;
  always #7  clk_dwg   = ~clk_dwg;
  always #5  clk_to    = ~clk_to;
  always #4  clk_mcdds = ~clk_mcdds;
  always #3  clk_dds16 = ~clk_dds16;

  host_wr_t host_dwg, host_tog, host_tov, host_mcdds, host_dds16;
  logic [7:0] dac_dwg, dac_tov, dac_mcdds, dac_dds16;
  logic [11:0] to_note_tick, to_clk;

  dwg_top dut (.*);

  // ---- mechanism counters ---------------------------------------------------
  int n_reload = 0, n_wrap = 0, n_shape = 0, n_tosel = 0, n_octave = 0;
  int n_writeback = 0, n_restart = 0, n_l6 = 0, n_mode = 0, n_tree = 0;

  always @(posedge clk_dwg) if (dut.u_dwg.tc) n_reload++;
  always @(posedge clk_dwg) if (dut.u_dwg.tc && dut.u_dwg.point == 8'hFF) n_wrap++;
  always @(posedge clk_mcdds) if (dut.u_mcdds.u_phase.we) n_writeback++;
  always @(posedge clk_mcdds)
    if (dut.u_mcdds.step && !dut.u_mcdds.uw.mux_acc && dut.u_mcdds.fill == 2'd3) n_restart++;
  always @(posedge clk_mcdds) if (dut.u_mcdds.step && dut.u_mcdds.uw.l6_en) n_l6++;

  // ---- behavioural stand-in for the twelve x256 PLLs -----------------------
  int pll_acc [12];
  int divs [12] = '{3444, 3251, 3068, 2896, 2734, 2580, 2435, 2299, 2170, 2048, 1933, 1825};
  always @(posedge clk_to) begin
    for (int i = 0; i < 12; i++) begin
      pll_acc[i] += 256;
      to_clk[i] <= pll_acc[i] >= divs[i];
      if (pll_acc[i] >= divs[i]) pll_acc[i] -= divs[i];
    end
  end

  task automatic wr(ref logic clk, ref host_wr_t h, input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); h = '{we: 1'b1, addr: a, data: d};
    @(negedge clk); h = '0;
  endtask

  // ---- original voice ------------------------------------------------------
  task automatic test_dwg();
    logic [7:0] last;
    int since, steps;
    for (int s = 0; s < 4; s++)
      for (int a = 0; a < 256; a++) wr(clk_dwg, host_dwg, 16'h0400 + 16'(s * 256 + a), 8'(a + s * 64));
    wr(clk_dwg, host_dwg, 16'h0000, 8'd5);
    wr(clk_dwg, host_dwg, 16'h0002, 8'd1);
    repeat (20) @(negedge clk_dwg);
    last = dac_dwg; since = 0; steps = -1;
    for (int t = 0; t < 5 * 600; t++) begin
      @(negedge clk_dwg); since++;
      if (t == 5 * 300) begin
        host_dwg = '{we: 1'b1, addr: 16'h0002, data: 8'd3};
        @(negedge clk_dwg); host_dwg = '0; since++;
        n_shape++;
        last = last + 8'd128;     // shape 3 = shape 1 + 128
      end
      if (dac_dwg != last) begin
        checks++;
        if (dac_dwg != last + 8'd1) begin failures++; $display("dwg: %0d after %0d", dac_dwg, last); end
        if (steps >= 0) begin
          checks++;
          if (since != 5) begin failures++; $display("dwg: step after %0d clocks", since); end
        end
        steps++; since = 0; last = dac_dwg;
      end
    end
  endtask

  // ---- top-octave generators and voice -------------------------------------
  task automatic test_to();
    int last [12], seen [12];
    for (int i = 0; i < 12; i++) begin
      wr(clk_to, host_tog, 16'(2 * i), 8'(divs[i]));
      wr(clk_to, host_tog, 16'(2 * i + 1), 8'(divs[i] >> 8));
      last[i] = -1; seen[i] = 0;
    end
    repeat (4000) @(negedge clk_to);
    for (int t = 0; t < 3 * 3444 + 10; t++) begin
      @(negedge clk_to);
      for (int i = 0; i < 12; i++) if (to_note_tick[i]) begin
        if (last[i] >= 0) begin
          checks++;
          if (t - last[i] != divs[i]) begin failures++; $display("note %0d: period %0d", i, t - last[i]); end
          seen[i]++;
        end
        last[i] = t;
      end
    end
    for (int i = 0; i < 12; i++) begin checks++; if (seen[i] < 2) failures++; end
    // voice: wave RAM holds its address
    for (int a = 0; a < 256; a++) wr(clk_to, host_tov, 16'h0100 + 16'(a), 8'(a));
    for (int oct = 0; oct < 2; oct++) begin
      logic [7:0] last_d;
      int since, steps;
      wr(clk_to, host_tov, 16'h0000, 8'(oct + 1));
      wr(clk_to, host_tov, 16'h0001, 8'd9);         // A
      n_tosel++;
      if (oct == 1) n_octave++;
      repeat (100) @(negedge clk_to);
      last_d = dac_tov; since = 0; steps = -1;
      for (int t = 0; t < 2000; t++) begin
        @(negedge clk_to); since++;
        if (dac_tov != last_d) begin
          checks++;
          if (dac_tov != last_d + 8'd1) begin failures++; $display("tov: %0d after %0d", dac_tov, last_d); end
          if (steps >= 0) begin
            checks++;
            if (since != 8 * (oct + 1)) begin failures++; $display("tov: step after %0d", since); end
          end
          steps++; since = 0; last_d = dac_tov;
        end
      end
      checks++; if (steps < 100) failures++;
    end
  endtask

  // ---- multi-channel DDS ---------------------------------------------------
  logic [7:0]  m_lut [1024];
  logic [31:0] m_add [16];
  logic [7:0]  m_trace [4000];

  function automatic logic [7:0] m_model(int c, int mode, int f);
    int s = 0;
    for (int ch = 0; ch < c; ch++) begin
      logic [31:0] ph;
      int a;
      ph = 32'(f + 1) * m_add[ch];
      a = (mode == 0) ? ch * 256 + int'(ph[31:24]) : ch * 64 + int'(ph[31:26]);
      s += int'(m_lut[a]);
    end
    return 8'(s >> 4);
  endfunction

  task automatic load_prog(input int c);
    for (int k = 0; k < 16; k++) begin
      microword_t w;
      w = '0;
      w.next = 4'((k + 1) % c); w.rd_ch = 4'(k); w.wr_ch = 4'((k + c - 2) % c);
      w.mux_acc = (k != 3); w.l6_en = (k == 3); w.we_en = 1'b1;
      wr(clk_mcdds, host_mcdds, 16'h0100 + 16'(k), w[7:0]);
      wr(clk_mcdds, host_mcdds, 16'h0110 + 16'(k), w[15:8]);
    end
  endtask

  task automatic test_mcdds(input int c, input int mode, input int frames);
    int t0;
    rst_n = 0;
    load_prog(c);
    @(negedge clk_mcdds); rst_n = 1;
    host_mcdds = '{we: 1'b1, addr: 16'h0200, data: 8'(mode)};
    if (mode != 0) n_mode++;
    for (int t = 1; t < 2 * c * frames + 40 * c; t++) begin
      @(negedge clk_mcdds); host_mcdds = '0;
      m_trace[t] = dac_mcdds;
    end
    t0 = 2 * c + 10;
    for (int f = 0; f < frames; f++) begin
      logic [7:0] m;
      m = m_model(c, mode, f);
      for (int k = 0; k < 2 * c; k++) begin
        checks++;
        if (m_trace[t0 + 2 * c * f + k] !== m) begin
          failures++; if (failures < 10) $display("mcdds C=%0d frame %0d: %0d expected %0d", c, f,
                                                  m_trace[t0 + 2 * c * f + k], m);
        end
      end
    end
  endtask

  // ---- 16-channel FPGA DDS -------------------------------------------------
  logic [7:0]  d_lut [16][256];
  logic [31:0] d_adj [16], d_acc [16];
  int d_hist [0:5];
  bit d_check = 0;
  always @(posedge clk_dds16) begin
    if (!rst_n) begin
      foreach (d_acc[c]) begin d_acc[c] = '0; d_adj[c] = '0; end
      foreach (d_hist[i]) d_hist[i] = 0;
    end else begin
      int s;
      s = 0;
      for (int c = 0; c < 16; c++) begin
        s += int'(d_lut[c][d_acc[c][31:24]]);
        d_acc[c] = d_acc[c] + d_adj[c];
      end
      for (int i = 5; i > 0; i--) d_hist[i] = d_hist[i-1];
      d_hist[0] = s;
      if (host_dds16.we && host_dds16.addr[8:2] == 0)
        d_adj[host_dds16.addr[12:9]][8*host_dds16.addr[1:0] +: 8] = host_dds16.data;
    end
  end
  always @(negedge clk_dds16) if (d_check) begin
    checks++;
    if (dac_dds16 !== 8'(d_hist[4] >> 4)) begin
      failures++; if (failures < 10) $display("dds16: %0d expected %0d", dac_dds16, d_hist[4] >> 4);
    end
    if (d_hist[4] > 255) n_tree++;
  end

  task automatic test_dds16();
    repeat (6) @(negedge clk_dds16);
    d_check = 1;
    for (int c = 0; c < 16; c++) begin
      logic [31:0] v;
      v = $urandom;
      for (int b = 0; b < 4; b++) wr(clk_dds16, host_dds16, 16'(c * 512 + b), v[8*b +: 8]);
    end
    repeat (1500) @(negedge clk_dds16);
    d_check = 0;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    host_dwg = '0; host_tog = '0; host_tov = '0; host_mcdds = '0; host_dds16 = '0;
    rst_n = 0;
    for (int i = 0; i < 12; i++) pll_acc[i] = 0;
    // memories have no reset: load the multi-channel and FPGA tables first
    for (int a = 0; a < 1024; a++) begin
      m_lut[a] = 8'($urandom); wr(clk_mcdds, host_mcdds, 16'h0400 + 16'(a), m_lut[a]);
    end
    for (int ch = 0; ch < 16; ch++) begin
      m_add[ch] = (ch == 1) ? 32'd1797877 : $urandom;
      for (int b = 0; b < 4; b++) wr(clk_mcdds, host_mcdds, 16'(ch * 4 + b), m_add[ch][8*b +: 8]);
    end
    for (int c = 0; c < 16; c++)
      for (int a = 0; a < 256; a++) begin
        d_lut[c][a] = 8'($urandom); wr(clk_dds16, host_dds16, 16'(c * 512 + 256 + a), d_lut[c][a]);
      end
    load_prog(4);    // the sequencer RAMs must hold a program before reset ends
    repeat (3) @(negedge clk_dwg);
    rst_n = 1;
    fork
      test_dwg();
      test_to();
      test_dds16();
    join
    test_mcdds(4, 0, 200);
    test_mcdds(16, 2, 60);
    begin
      string names [10] = '{"divider reload", "256-point wrap", "shape switch", "top-octave clock select",
                            "octave division", "phase write-back", "sum restart (mux)", "latch 6 load",
                            "table split mode", "adder tree carry"};
      int counts [10];
      counts = '{n_reload, n_wrap, n_shape, n_tosel, n_octave, n_writeback, n_restart, n_l6, n_mode, n_tree};
      for (int i = 0; i < 10; i++) begin
        $display("mechanism %-24s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
