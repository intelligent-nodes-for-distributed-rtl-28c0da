// tb_irq_ctrl: self-checking test of the interrupt circuit.
// Random request edges and acknowledges are applied for many clocks; a
// reference model kept here (pending set per source, lowest number first)
// predicts INT1, the reported source and the pending set every clock. The
// test also counts that several requests were pending at once at least once.
module tb_irq_ctrl;
  localparam int unsigned N = 4;
  logic clk = 1'b0, rst_n = 1'b0, ack = 1'b0;
  logic [N-1:0] req = '0, pending;
  logic int1_n;
  logic [1:0] src_id;
  logic [N-1:0] m_pend = '0, m_req_d = '0;
  logic m_ack_d = 1'b0;
  int checks = 0, failures = 0, n_multi = 0, n_ack = 0;

  irq_ctrl #(.N_SRC(N)) dut (.*);

  always #5 clk = ~clk;

  function automatic int lowest(input logic [N-1:0] p);
    for (int i = 0; i < N; i++) if (p[i]) return i;
    return 0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      // compare state after the last edge
      checks++;
      if (pending !== m_pend || int1_n !== (m_pend == '0) ||
          (m_pend != '0 && src_id !== 2'(lowest(m_pend)))) begin
        failures++;
        if (failures < 10) $display("cycle %0d: pend=%b exp=%b id=%0d", c, pending, m_pend, src_id);
      end
      if ($countones(m_pend) > 1) n_multi++;
      // new stimulus
      for (int i = 0; i < N; i++) if ($urandom_range(0, 5) == 0) req[i] = ~req[i];
      ack = ($urandom_range(0, 3) == 0);
      // model the next edge
      @(posedge clk);
      begin
        logic [N-1:0] clr;
        clr = '0;
        if (ack && !m_ack_d && m_pend != '0) begin clr[lowest(m_pend)] = 1'b1; n_ack++; end
        m_pend  = (m_pend & ~clr) | (req & ~m_req_d);
        m_req_d = req;
        m_ack_d = ack;
      end
    end
    checks++; if (n_multi == 0 || n_ack == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
