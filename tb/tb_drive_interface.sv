// tb_drive_interface -- random stimulus on every FDC output, PIA pin and
// drive status line; checks the active-low drive lines, the active-high
// FDC inputs, that released PIA pins leave every drive deselected (the
// reset case), PA3 as SELECT 3 or SIDE SELECT according to the strap,
// and the port read-back.
`timescale 1ns / 1ps
module tb_drive_interface;
  logic       fdc_hld, fdc_stp, fdc_hdr, fdc_wgt, fdc_wdt, fdc_lct;
  logic       fdc_idx, fdc_rdy, fdc_wpt, fdc_trz, raw_data;
  logic [7:0] pa_out, pa_oe, pa_in;
  logic       two_side;
  logic [3:0] drv_select_n;
  logic       drv_side_n, drv_hdld_n, drv_step_n, drv_stepin_n, drv_wgate_n, drv_wdata_n, drv_lowcur_n;
  logic       drv_index_n, drv_ready_n, drv_wprot_n, drv_trk00_n, drv_rdata_n;
  int checks = 0, failures = 0;

  drive_interface dut (.*);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 500; n++) begin
      logic [7:0] pin;
      {fdc_hld, fdc_stp, fdc_hdr, fdc_wgt, fdc_wdt, fdc_lct} = 6'($urandom);
      {drv_index_n, drv_ready_n, drv_wprot_n, drv_trk00_n, drv_rdata_n} = 5'($urandom);
      two_side = 1'($urandom);
      pa_out = 8'($urandom);
      pa_oe  = (n < 20) ? 8'h00 : 8'($urandom);   // first: PIA after reset
      #1;
      for (int i = 0; i < 8; i++) pin[i] = pa_oe[i] ? pa_out[i] : 1'b1;
      expect_eq({drv_hdld_n, drv_step_n, drv_stepin_n, drv_wgate_n, drv_wdata_n, drv_lowcur_n},
                6'(~{fdc_hld, fdc_stp, fdc_hdr, fdc_wgt, fdc_wdt, fdc_lct}), "drivers");
      expect_eq({fdc_idx, fdc_rdy, fdc_wpt, fdc_trz, raw_data},
                5'(~{drv_index_n, drv_ready_n, drv_wprot_n, drv_trk00_n, drv_rdata_n}), "receivers");
      if (two_side) begin
        expect_eq(drv_select_n, {1'b1, pin[2:0]}, "select, three double-sided drives");
        expect_eq(drv_side_n, pin[3], "side select from PA3");
      end else begin
        expect_eq(drv_select_n, pin[3:0], "select, four single-sided drives");
        expect_eq(drv_side_n, 1'b1, "side 0");
      end
      expect_eq(pa_in, pin, "port read-back");
      if (n < 20) expect_eq(drv_select_n, 4'hF, "no select after reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
