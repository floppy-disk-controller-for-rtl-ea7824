// tb_ctrl_decode -- exhaustive check of the controller module decoder.
// Every address with VMA high and low is applied; the expected selects are
// computed from the address ranges of the memory map (FDC EC00-EC3F, PIA
// EC40-EC7F, RAM EF00-EFFF), not from the decoder's structure. Also counts
// the images of the FDC (8 per register) and PIA (16 per register).
`timescale 1ns / 1ps
module tb_ctrl_decode;
  logic [15:0] addr;
  logic        vma;
  logic        fdc_cs_n, pia_cs_n, sram_cs_n;
  logic [1:0]  page_spare_n, area_spare_n;
  logic [2:0]  rs;
  int checks = 0, failures = 0;
  int fdc_hits = 0, pia_hits = 0, ram_hits = 0;

  ctrl_decode dut (.*);

  initial begin
    #5ms;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++) begin
      for (int a = 0; a < 65536; a++) begin
        bit exp_fdc, exp_pia, exp_ram, exp_ed, exp_ee;
        addr = 16'(a);
        vma  = v[0];
        #1;
        exp_fdc = vma && a >= 'hEC00 && a <= 'hEC3F;
        exp_pia = vma && a >= 'hEC40 && a <= 'hEC7F;
        exp_ram = vma && a >= 'hEF00 && a <= 'hEFFF;
        exp_ed  = vma && a >= 'hED00 && a <= 'hEDFF;
        exp_ee  = vma && a >= 'hEE00 && a <= 'hEEFF;
        checks++;
        if (fdc_cs_n != !exp_fdc || pia_cs_n != !exp_pia || sram_cs_n != !exp_ram ||
            page_spare_n != {!exp_ee, !exp_ed} || rs != 3'(a % 8)) begin
          failures++;
          if (failures < 10)
            $display("FAIL addr=%h vma=%0d fdc=%b pia=%b ram=%b spare=%b rs=%0d",
                     addr, vma, fdc_cs_n, pia_cs_n, sram_cs_n, page_spare_n, rs);
        end
        if (!fdc_cs_n && rs == 3'd0) fdc_hits++;
        if (!pia_cs_n && rs[1:0] == 2'd0) pia_hits++;
        if (!sram_cs_n) ram_hits++;
      end
    end
    checks++;
    if (fdc_hits != 8 || pia_hits != 16 || ram_hits != 256) begin
      failures++;
      $display("FAIL image counts fdc=%0d pia=%0d ram=%0d", fdc_hits, pia_hits, ram_hits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
