// tb_bus_dir_ctrl -- checks the data-buffer direction for every input
// combination in which at most one device is selected, against the
// behaviour the controller needs: idle -> data in (1); PIA or RAM read ->
// data out (0), write -> in; FDC selected -> follows the FDC's BD (out while
// the FDC drives the bus); DMA acknowledge -> follows R/W with BD = NOT R/W.
`timescale 1ns / 1ps
module tb_bus_dir_ctrl;
  logic rw, fdc_bd, txak_n, fdc_cs_n, pia_cs_n, ram_cs_n, dir;
  int checks = 0, failures = 0;

  bus_dir_ctrl dut (.*);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit exp, input string what);
    #1;
    checks++;
    if (dir !== exp) begin
      failures++;
      $display("FAIL %s rw=%b bd=%b txak_n=%b fdc=%b pia=%b ram=%b dir=%b exp=%b",
               what, rw, fdc_bd, txak_n, fdc_cs_n, pia_cs_n, ram_cs_n, dir, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin
      rw = i[0]; fdc_bd = i[1];
      // Non-DMA, nothing selected.
      txak_n = 1; fdc_cs_n = 1; pia_cs_n = 1; ram_cs_n = 1; chk(1'b1, "idle");
      // PIA / RAM.
      pia_cs_n = 0; chk(!rw, "pia");
      pia_cs_n = 1; ram_cs_n = 0; chk(!rw, "ram");
      ram_cs_n = 1;
      // FDC selected: BD decides.
      fdc_cs_n = 0; chk(!fdc_bd, "fdc");
      fdc_cs_n = 1;
    end
    // FDC selected with the BD the FDC gives outside DMA (BD = R/W).
    for (int r = 0; r < 2; r++) begin
      rw = r[0]; fdc_bd = rw; txak_n = 1; fdc_cs_n = 0; pia_cs_n = 1; ram_cs_n = 1;
      chk(!rw, "fdc bd=rw");
    end
    // DMA: TxAK active, no select, BD = NOT R/W.
    for (int r = 0; r < 2; r++) begin
      rw = r[0]; fdc_bd = !rw; txak_n = 0; fdc_cs_n = 1; pia_cs_n = 1; ram_cs_n = 1;
      chk(rw, "dma");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
