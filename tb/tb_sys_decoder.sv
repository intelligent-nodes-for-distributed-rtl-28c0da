// tb_sys_decoder: exhaustive check of the node's address decoder.
// Every one of the 65536 addresses is applied and each select line is
// compared with the memory map written out here as plain address ranges.
module tb_sys_decoder;
  import in_node_pkg::*;
  logic [15:0] addr;
  dec_sel_t    sel;
  int checks = 0, failures = 0;
  int n_ram = 0, n_code = 0, n_exp = 0, n_other = 0;

  sys_decoder dut (.addr, .sel);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 65536; a++) begin
      logic e_ram, e_code, e_exp, e_sx, e_si;
      logic [3:0] e_bo;
      logic [1:0] e_bi;
      addr = 16'(a);
      #1;
      e_ram  = (a <= 'h7FFF);
      e_code = (a <= 'h3FFF);
      e_exp  = (a >= 'h8000) && (a <= 'h80FF);
      e_sx   = (a == 'hC040);
      e_si   = (a == 'hC080);
      e_bo   = {a == 'hC0E1, a == 'hC0E0, a == 'hC0D1, a == 'hC0D0};
      e_bi   = {a == 'hC0F1, a == 'hC0F0};
      checks++;
      if (sel.ram !== e_ram || sel.code !== e_code || sel.exp !== e_exp ||
          sel.sw_ext !== e_sx || sel.sw_int !== e_si ||
          sel.biop_out !== e_bo || sel.biop_in !== e_bi) begin
        failures++;
        if (failures < 10) $display("mismatch at %04h: %b", a, sel);
      end
      n_ram += int'(e_ram); n_code += int'(e_code); n_exp += int'(e_exp);
      n_other += int'(e_sx | e_si | (|e_bo) | (|e_bi));
    end
    // Region sizes from the map: 32K RAM, 16K code, 256 expansion, 8 singles.
    checks++; if (n_ram != 32768 || n_code != 16384 || n_exp != 256 || n_other != 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
