// tb_sbi_bus: self-checking test of the system bus interface.
// For all combinations of expansion select, RD and WR, with random address
// and data bytes, checks the EWR/ERD strobes, the buffer directions and the
// data passed each way.
module tb_sbi_bus;
  logic sel_exp, rd_n, wr_n;
  logic [7:0] din, dat_in, dat_out, dout;
  logic ewr_n, erd_n, dat_oe, dout_en;
  int checks = 0, failures = 0;

  sbi_bus dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      logic e_w, e_r;
      sel_exp = n[0]; rd_n = n[1]; wr_n = n[2];
      din = 8'($urandom); dat_in = 8'($urandom);
      #1;
      e_w = sel_exp && !wr_n;
      e_r = sel_exp && !rd_n;
      checks++;
      if (ewr_n !== !e_w || erd_n !== !e_r || dat_oe !== e_w ||
          dout_en !== e_r || (e_w && dat_out !== din) || (e_r && dout !== dat_in)) begin
        failures++;
        $display("mismatch n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
