// tb_data_separator -- feeds the data separator an FM (single density) raw
// pulse train from an ideal 8 MHz VCO clock and checks what it recovers.
//
// The stream is 6 bytes of 00 (clock bits only), an ID address mark (data
// FE with the missing-clock pattern C7), and random bytes, all with normal
// FF clocks except the mark. Each bit cell is 4 us: a clock pulse at the
// start, a data pulse 2 us later for a one, every pulse 200 ns wide.
// At each DCK edge the testbench samples RDT and so rebuilds the sequence
// of half bit cells (clock, data, clock, ...); the sequence the stream was
// built from is then searched in it and compared bit by bit. Checked too:
// without jitter, DCK edges are exactly one window (16 VCO periods = 2 us)
// apart; a second pass shifts every pulse by up to +-400 ns and must still
// decode every half cell. Windows with no pulse (the flywheel case of the
// window counter) are counted and must occur.
`timescale 1ns / 1ps
module tb_data_separator;
  logic vco_clk = 0, rst = 1, raw_data = 0;
  logic rdt, dck, ref_r, var_v, pulse_seen;
  logic [3:0] window;
  int checks = 0, failures = 0;

  data_separator dut (.*);

  always #62.5 vco_clk = !vco_clk;   // 8 MHz

  initial begin
    #20ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit exp_bits [$];   // half bit cells sent
  bit got_bits [$];   // half bit cells recovered
  realtime last_edge;
  int bad_interval, n_intervals, empty_windows;
  bit check_interval;

  // Sample RDT at every DCK edge.
  always @(dck) begin
    #1;
    got_bits.push_back(rdt);
    if (!rdt) empty_windows++;
    if (check_interval && last_edge > 0) begin
      n_intervals++;
      if ($realtime - last_edge != 2000.0) bad_interval++;
    end
    last_edge = $realtime;
  end

  task automatic pulse(input real shift_ns);
    fork
      begin
        #(1000.0 + shift_ns) raw_data = 1;
        #200 raw_data = 0;
      end
    join_none
  endtask

  // One FM bit cell: clock half then data half, 2 us each. Pulses sit
  // 1 us into their half so that a shift of either sign is possible.
  task automatic fm_cell(input bit c, input bit d, input int jitter_ns);
    int j;
    j = (jitter_ns == 0) ? 0 : ($urandom_range(2 * jitter_ns) - jitter_ns);
    if (c) pulse(real'(j));
    exp_bits.push_back(c);
    #2000;
    j = (jitter_ns == 0) ? 0 : ($urandom_range(2 * jitter_ns) - jitter_ns);
    if (d) pulse(real'(j));
    exp_bits.push_back(d);
    #2000;
  endtask

  task automatic fm_byte(input logic [7:0] data, input logic [7:0] clk_pat, input int jitter_ns);
    for (int i = 7; i >= 0; i--) fm_cell(clk_pat[i], data[i], jitter_ns);
  endtask

  // Find the sent sequence in the recovered one and compare.
  task automatic compare(input string what);
    int best, best_off, skip;
    skip = 24;   // first three bytes of preamble: lock-in
    best = -1; best_off = 0;
    for (int off = 0; off < 80; off++) begin
      int m;
      m = 0;
      for (int i = skip; i < exp_bits.size(); i++)
        if (off + i - skip < got_bits.size() && got_bits[off + i - skip] == exp_bits[i]) m++;
      if (m > best) begin best = m; best_off = off; end
    end
    for (int i = skip; i < exp_bits.size(); i++) begin
      checks++;
      if (best_off + i - skip >= got_bits.size() || got_bits[best_off + i - skip] != exp_bits[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s half-cell %0d", what, i);
      end
    end
    $display("%s: %0d half cells compared, %0d match", what, exp_bits.size() - skip, best);
  endtask

  initial begin
    #1000 rst = 0;
    // Pass 1: no jitter.
    check_interval = 1;
    for (int i = 0; i < 6; i++) fm_byte(8'h00, 8'hFF, 0);
    fm_byte(8'hFE, 8'hC7, 0);
    for (int i = 0; i < 20; i++) fm_byte(8'($urandom), 8'hFF, 0);
    #8000;
    compare("ideal");
    checks++;
    if (n_intervals < 300 || bad_interval != 0) begin
      failures++;
      $display("FAIL DCK interval: %0d of %0d not 2 us", bad_interval, n_intervals);
    end
    // Pass 2: +-400 ns pulse shift.
    check_interval = 0;
    exp_bits.delete(); got_bits.delete();
    for (int i = 0; i < 6; i++) fm_byte(8'h00, 8'hFF, 400);
    fm_byte(8'hFE, 8'hC7, 400);
    for (int i = 0; i < 20; i++) fm_byte(8'($urandom), 8'hFF, 400);
    #8000;
    compare("jitter");
    checks++;
    if (empty_windows == 0) begin
      failures++;
      $display("FAIL no empty window seen");
    end
    $display("empty windows %0d", empty_windows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
