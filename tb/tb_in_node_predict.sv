// tb_in_node_predict: the node holding and serving the two drift-prediction
// models, at the top's default parameters.
//
// This testbench plays the MCU and the central computer. The loader places a
// short routine in the code range, then stores each model's weights and
// thresholds and a window of samples as 64-bit IEEE doubles (little-endian)
// in the data half of the RAM, and switches to the routine. The routine then
// runs the predictor over the bus: it reads the weights and the last N
// samples with MOVX, evaluates s = sum(x_i * w_i) - T and y = f(s), and
// writes the prediction back into the data area.
//   * Model A: six-input linear neuron, f(s) = s, on the thermocouple-drift
//     curve y = a x^2 + b x + c sin(x) sampled with step 0.4 on 40..80.
//     The weights -1, 6, -15, 20, -15, 6 (oldest sample first, T = 0)
//     extrapolate any polynomial of degree five exactly, so the one-step
//     error stays small.
//   * Model B: 5-4-1 perceptron with sigmoid units on the channel-error curve
//     y = a sin(bx + c) + d sin(ex + f) + g sampled with step 0.1, with fixed
//     small weights (training happens on the central computer).
// One-step prediction uses stored real samples; multi-step prediction reads
// back its own earlier predictions from RAM as inputs. Every value computed
// through the node is compared with the same computation on a private copy
// of the parameters, so any corrupted byte shows as a mismatch. The curve
// coefficients are this testbench's choice.
module tb_in_node_predict;
  import in_node_pkg::*;

  logic clk = 1'b0, por_n = 1'b0;
  logic mcu_rst, mcu_ea_n, mcu_int0_n, mcu_int1_n;
  logic mcu_ale = 1'b0, mcu_psen_n = 1'b1, mcu_rd_n = 1'b1, mcu_wr_n = 1'b1;
  logic [7:0] mcu_p2 = '0, mcu_p0_out = '0, mcu_p0_in;
  logic mcu_p0_oe = 1'b0, mcu_p1_ack = 1'b0;
  logic [1:0] mcu_p1_src;
  logic [7:0] sbi_a, sbi_dat_out;
  logic [7:0] sbi_dat_in = 8'h00;
  logic sbi_dat_oe, sbi_ewr_n, sbi_erd_n, sbi_nmi = 1'b0;
  logic [3:0] sbi_irq = '0, irq_pending;
  logic [7:0] biop_out [4];
  logic [7:0] biop_in  [2];
  prog_mode_e mode;
  logic ram_wr_blocked;

  in_node dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // data-area layout
  localparam logic [15:0] A_W    = 16'h4000;   // model A: 6 weights + T
  localparam logic [15:0] A_X    = 16'h4040;   // 110 doubles up to 43B0   // model A: samples, then predictions
  localparam logic [15:0] B_W    = 16'h4400;   // model B: 5x4 + 4 + 4 + 1 = 29 floats
  localparam logic [15:0] B_X    = 16'h4500;   // model B: samples, then predictions
  localparam int A_N = 100, B_N = 50, STEPS = 10;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  typedef enum {CYC_WR, CYC_RD, CYC_PSEN} cyc_e;

  task automatic bus(input cyc_e kind, input logic [15:0] addr,
                     input logic [7:0] wdata, output logic [7:0] rdata);
    @(negedge clk);
    mcu_ale = 1'b1; mcu_p2 = addr[15:8]; mcu_p0_out = addr[7:0]; mcu_p0_oe = 1'b1;
    @(negedge clk);
    mcu_ale = 1'b0;
    if (kind == CYC_WR) begin
      mcu_p0_out = wdata; mcu_wr_n = 1'b0;
    end else begin
      mcu_p0_oe = 1'b0;
      if (kind == CYC_RD) mcu_rd_n = 1'b0; else mcu_psen_n = 1'b0;
    end
    @(negedge clk);
    @(negedge clk);
    rdata = mcu_p0_in;
    mcu_wr_n = 1'b1; mcu_rd_n = 1'b1; mcu_psen_n = 1'b1; mcu_p0_oe = 1'b0;
  endtask

  task automatic wr_f(input logic [15:0] a, input real v);
    logic [63:0] b;
    logic [7:0] d;
    b = $realtobits(v);
    for (int k = 0; k < 8; k++) bus(CYC_WR, a + 16'(k), b[8*k +: 8], d);
  endtask

  task automatic rd_f(input logic [15:0] a, output real v);
    logic [63:0] b;
    logic [7:0] d;
    for (int k = 0; k < 8; k++) begin bus(CYC_RD, a + 16'(k), 8'h00, d); b[8*k +: 8] = d; end
    v = $bitstoreal(b);
  endtask

  function automatic real sigmoid(input real s);
    return 1.0 / (1.0 + $exp(-s));
  endfunction

  // the two curves
  function automatic real curve_a(input int i);   // eq. (9), x = 40 + 0.4 i
    real x;
    x = 40.0 + 0.4 * i;
    return real'(0.002 * x * x + 0.01 * x + 0.05 * $sin(x));
  endfunction
  function automatic real curve_b(input int i);   // eq. (8), x = 0.1 i
    real x;
    x = 0.1 * i;
    return real'(0.3 * $sin(1.2 * x + 0.4) + 0.1 * $sin(3.0 * x + 1.0) + 0.5);
  endfunction

  // private copies of the parameters
  real aw [7];
  real bw [29];   // w1[5][4] row-major, t1[4], w2[4], t2

  function automatic real model_a(input real x [6]);
    real s;
    s = 0.0;
    for (int i = 0; i < 6; i++) s += x[i] * aw[i];
    return s - aw[6];
  endfunction

  function automatic real model_b(input real x [5]);
    real h [4];
    real s;
    for (int j = 0; j < 4; j++) begin
      s = 0.0;
      for (int i = 0; i < 5; i++) s += x[i] * bw[i*4 + j];
      h[j] = sigmoid(s - bw[20 + j]);
    end
    s = 0.0;
    for (int j = 0; j < 4; j++) s += h[j] * bw[24 + j];
    return sigmoid(s - bw[28]);
  endfunction

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] q;
    real v, p_node, p_ref, max_err_a;
    real xa [6];
    real xb [5];
    real wbuf [29];
    int n_onestep = 0, n_multistep = 0;
    biop_in[0] = 8'h00; biop_in[1] = 8'h00;

    aw = '{-1.0, 6.0, -15.0, 20.0, -15.0, 6.0, 0.0};   // oldest sample first
    for (int k = 0; k < 29; k++) bw[k] = real'(0.25 * $sin(1.7 * k + 0.3));

    repeat (3) @(negedge clk);
    por_n = 1'b1;
    while (mcu_rst) @(negedge clk);

    // loader: a routine stub in the code range, then parameters and samples
    for (int a = 0; a < 64; a++) bus(CYC_WR, 16'(a), 8'(a * 3 + 1), q);
    for (int k = 0; k < 7; k++)  wr_f(A_W + 16'(8*k), aw[k]);
    for (int k = 0; k < 29; k++) wr_f(B_W + 16'(8*k), bw[k]);
    for (int i = 0; i < A_N; i++) wr_f(A_X + 16'(8*i), curve_a(i));
    for (int i = 0; i < B_N; i++) wr_f(B_X + 16'(8*i), curve_b(i));

    // switch to the loaded routine
    bus(CYC_WR, 16'hC040, 8'h00, q);
    @(negedge clk);
    while (mcu_rst) @(negedge clk);
    check(mode == MODE_EXTERNAL, "routine mode");
    for (int a = 0; a < 64; a++) begin
      bus(CYC_PSEN, 16'(a), 8'h00, q);
      check(q === 8'(a * 3 + 1), "routine stub fetched");
    end

    // model A, one-step: predict sample i from the six real samples before it
    for (int k = 0; k < 7; k++) begin rd_f(A_W + 16'(8*k), v); check(v == aw[k], $sformatf("model A weight %0d: %f vs %f", k, v, aw[k])); end
    max_err_a = 0.0;
    for (int i = 6; i < 30; i++) begin
      real xr [6];
      for (int k = 0; k < 6; k++) begin
        rd_f(A_X + 16'(8*(i - 6 + k)), xa[k]);
        xr[k] = curve_a(i - 6 + k);
      end
      p_node = model_a(xa);
      p_ref  = model_a(xr);
      check(p_node == p_ref, "model A one-step through the node");
      if ((p_ref - curve_a(i)) > max_err_a) max_err_a = p_ref - curve_a(i);
      if ((curve_a(i) - p_ref) > max_err_a) max_err_a = curve_a(i) - p_ref;
      n_onestep++;
    end
    check(max_err_a < 0.01, $sformatf("model A one-step error %f", max_err_a));

    // model A, multi-step: the window is the RAM area itself; each prediction
    // is written after the last real sample and used as input for the next
    begin
      real win [6];
      for (int k = 0; k < 6; k++) win[k] = curve_a(A_N - 6 + k);
      for (int s = 0; s < STEPS; s++) begin
        int base;
        base = A_N - 6 + s;
        for (int k = 0; k < 6; k++) rd_f(A_X + 16'(8*(base + k)), xa[k]);
        p_node = model_a(xa);
        wr_f(A_X + 16'(8*(A_N + s)), p_node);
        p_ref = model_a(win);
        for (int k = 0; k < 5; k++) win[k] = win[k+1];
        win[5] = p_ref;
        check(p_node == p_ref, "model A multi-step through the node");
        n_multistep++;
      end
    end

    // model B: weights, then one-step and multi-step over five inputs
    for (int k = 0; k < 29; k++) begin rd_f(B_W + 16'(8*k), wbuf[k]); check(wbuf[k] == bw[k], "model B weight"); end
    for (int i = 5; i < 20; i++) begin
      real xr [5];
      for (int k = 0; k < 5; k++) begin
        rd_f(B_X + 16'(8*(i - 5 + k)), xb[k]);
        xr[k] = curve_b(i - 5 + k);
      end
      p_node = model_b(xb);
      p_ref  = model_b(xr);
      check(p_node == p_ref && p_node > 0.0 && p_node < 1.0, "model B one-step through the node");
      n_onestep++;
    end
    begin
      real win [5];
      for (int k = 0; k < 5; k++) win[k] = curve_b(B_N - 5 + k);
      for (int s = 0; s < STEPS; s++) begin
        int base;
        base = B_N - 5 + s;
        for (int k = 0; k < 5; k++) rd_f(B_X + 16'(8*(base + k)), xb[k]);
        p_node = model_b(xb);
        wr_f(B_X + 16'(8*(B_N + s)), p_node);
        p_ref = model_b(win);
        for (int k = 0; k < 4; k++) win[k] = win[k+1];
        win[4] = p_ref;
        check(p_node == p_ref, "model B multi-step through the node");
        n_multistep++;
      end
    end

    // the routine itself stays intact while predicting
    bus(CYC_WR, 16'h0005, 8'h00, q);
    bus(CYC_PSEN, 16'h0005, 8'h00, q);
    check(q === 8'(5 * 3 + 1), "routine write-protected");

    check(n_onestep > 0 && n_multistep > 0, "both prediction methods ran");
    $display("one-step predictions=%0d multi-step predictions=%0d model A max one-step error=%f",
             n_onestep, n_multistep, max_err_a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
