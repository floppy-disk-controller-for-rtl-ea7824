// tb_refresh_ctrl -- runs the hidden refresh controller with a 1 MHz phi2
// and a 20 MHz timing clock against two bank models of 4116 RAMs for
// 3.5 ms, longer than the 2 ms refresh period, with a random mix of RAM
// writes, RAM reads and cycles to other devices. Checked:
//   - every byte written reads back (a row the controller fails to refresh
//     within 2 ms loses its data in the model);
//   - the refresh counter advances by one each bus cycle, so all 128 rows
//     are refreshed in 128 us, and no row is ever older than 130 us;
//   - RAS/CAS timing rules of the RAM model are never violated;
//   - CAS only in phi2 and only for the bank selected by A14.
// Refresh-only cycles and access-plus-refresh cycles are both counted and
// must both occur.
`timescale 1ns / 1ps
module tb_refresh_ctrl;
  logic        clk = 0, rst = 1, phi2 = 0, ram_sel = 0, a14 = 0;
  logic [13:0] cpu_addr = 0;
  logic        ras_n, s_col, refresh;
  logic [1:0]  cas_n;
  logic [6:0]  dram_addr, row_cnt;
  logic        rw = 1;
  logic [7:0]  wdata = 0;
  logic [7:0]  dout0, dout1;
  int checks = 0, failures = 0;
  int n_refresh_only = 0, n_access = 0, n_row_steps = 0;

  refresh_ctrl dut (.*);
  dram4116_model bank0 (.ras_n, .cas_n(cas_n[0]), .addr(dram_addr), .we_n(rw), .din(wdata), .dout(dout0));
  dram4116_model bank1 (.ras_n, .cas_n(cas_n[1]), .addr(dram_addr), .we_n(rw), .din(wdata), .dout(dout1));

  always #25 clk = !clk;   // 20 MHz

  initial begin
    #10ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] shadow [int];
  logic [6:0] prev_row;

  // One 1 us bus cycle: phi1 (phi2 low) then phi2 high; address, R/W and
  // VMA set up during phi1. Returns the data seen at the end of phi2.
  task automatic bus_cycle(input bit sel, input logic [14:0] a, input bit r, input logic [7:0] d,
                           output logic [7:0] q);
    phi2 = 0;
    #12;
    ram_sel = sel; a14 = a[14]; cpu_addr = a[13:0]; rw = r; wdata = d;
    #488;
    phi2 = 1;
    #490;
    q = a[14] ? dout1 : dout0;
    #10;
  endtask

  // CAS checks on the timing clock. The controller sees phi2 through one
  // clk register, so CAS may last until the clk edge after phi2 falls.
  logic phi2_d = 0, sel_c = 0, a14_c = 0;
  always @(posedge phi2) begin sel_c = ram_sel; a14_c = a14; end
  always @(posedge clk) if (!rst) begin
    if (cas_n != 2'b11) begin
      checks++;
      if (!(phi2 || phi2_d) || !sel_c || cas_n[a14_c] != 1'b0 || cas_n[!a14_c] != 1'b1) begin
        failures++;
        $display("FAIL CAS %b phi2=%b sel=%b a14=%b at %0t", cas_n, phi2, sel_c, a14_c, $time);
      end
    end
    phi2_d <= phi2;
  end

  initial begin
    logic [7:0] q;
    logic [14:0] a;
    int kind;
    repeat (4) @(posedge clk);
    rst = 0;
    prev_row = row_cnt;
    for (int n = 0; n < 3500; n++) begin
      kind = (n < 1500) ? int'($urandom_range(2)) : 3 + int'($urandom_range(1));
      a = 15'($urandom);
      if (n >= 1500) a = (n % 2) ? 15'h0123 : 15'h4321;   // hot spots only, rest must be refreshed
      case (kind)
        0: begin   // write
             logic [7:0] d;
             d = 8'($urandom);
             bus_cycle(1, a, 0, d, q);
             shadow[int'(a)] = d;
             n_access++;
           end
        1: begin   // read back something written
             if (shadow.num() > 0) begin
               int k;
               void'(shadow.first(k));
               a = 15'(k);
               bus_cycle(1, a, 1, 0, q);
               n_access++;
             end else bus_cycle(0, a, 1, 0, q);
           end
        default: begin   // another device: refresh only
             bus_cycle(0, a, 1, 0, q);
             n_refresh_only++;
           end
      endcase
      if (n > 0) checks++;
      if (n > 0 && row_cnt != 7'(prev_row + 1)) begin
        failures++;
        $display("FAIL refresh counter %0d after %0d", row_cnt, prev_row);
      end else n_row_steps++;
      prev_row = row_cnt;
    end
    // Read back everything after 2 ms of traffic that never touched most rows.
    foreach (shadow[k]) begin
      logic [7:0] q2;
      bus_cycle(1, 15'(k), 1, 0, q2);
      checks++;
      if (q2 !== shadow[k]) begin
        failures++;
        if (failures < 10) $display("FAIL read %h = %h expected %h", k, q2, shadow[k]);
      end
    end
    checks++;
    if (bank0.violations != 0 || bank1.violations != 0) begin
      failures++;
      $display("FAIL timing violations %0d %0d", bank0.violations, bank1.violations);
    end
    checks++;
    if (bank0.max_age > 130us || bank1.max_age > 130us) begin
      failures++;
      $display("FAIL row age %0t %0t", bank0.max_age, bank1.max_age);
    end
    checks++;
    if (n_refresh_only == 0 || n_access == 0) begin
      failures++;
      $display("FAIL cycle mix refresh-only=%0d access=%0d", n_refresh_only, n_access);
    end
    $display("refresh-only cycles %0d, access cycles %0d, rows stepped %0d, max row age %0t",
             n_refresh_only, n_access, n_row_steps, bank0.max_age);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
