// tb_mem_decode -- exhaustive check of the RAM/EPROM module decoder over
// all addresses, both VMA and R/W values and every strap setting. The
// expected selects come from the memory map: RAM 0000-7FFF, EPROM n at
// E000 + n*800 (EPROM 1 only E800-EBFF unless the full strap is set), and
// the buffer enables from "read when a device of the module is selected
// and R/W is high, write when selected and R/W is low".
`timescale 1ns / 1ps
module tb_mem_decode;
  logic [15:0] addr;
  logic        vma, rw;
  logic [3:0]  eprom_fit;
  logic        eprom1_full;
  logic        ram_sel, bank1_sel, eprom_sel, read_n, write_n;
  logic [3:0]  eprom_cs_n;
  int checks = 0, failures = 0;

  mem_decode dut (.*);

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 32; s++) begin
      eprom_fit   = 4'(s);
      eprom1_full = s[4];
      for (int c = 0; c < 4; c++) begin
        vma = c[0]; rw = c[1];
        for (int a = 0; a < 65536; a += (s == 31 ? 1 : 7)) begin
          bit [3:0] cs;
          bit r, any;
          addr = 16'(a);
          #1;
          r = vma && a < 'h8000;
          cs[0] = vma && eprom_fit[0] && a >= 'hE000 && a <= 'hE7FF;
          cs[1] = vma && eprom_fit[1] && a >= 'hE800 && a <= (eprom1_full ? 'hEFFF : 'hEBFF);
          cs[2] = vma && eprom_fit[2] && a >= 'hF000 && a <= 'hF7FF;
          cs[3] = vma && eprom_fit[3] && a >= 'hF800;
          any = r || (cs != 0);
          checks++;
          if (ram_sel !== r || bank1_sel !== addr[14] || eprom_cs_n !== ~cs ||
              eprom_sel !== (cs != 0) || read_n !== !(any && rw) || write_n !== !(any && !rw)) begin
            failures++;
            if (failures < 10)
              $display("FAIL a=%h vma=%b rw=%b fit=%b full=%b ram=%b cs=%b sel=%b rd=%b wr=%b",
                       addr, vma, rw, eprom_fit, eprom1_full, ram_sel, eprom_cs_n, eprom_sel, read_n, write_n);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
