// tb_qrs_filter: end-to-end test of the filter section at its default sizes.
//
// A cycle-level reference model (64-bit integers, wrapped to 16 bits)
// tracks x[n-1], y[n-1], y[n-2] and c[n-1] and predicts y[n] for every
// accepted sample. The test runs four phases: an impulse response of a
// stable low-pass section (checked against the hand-computed values
// 0.25, 0.625, 0.28125, ...), a synthetic heartbeat-like input through the
// same section, random coefficients, inputs and cascade partial sums with
// random gaps in sample_en, and a reset in mid-stream. It checks y_out,
// out_valid (one cycle after sample_en), the chain outputs, and that every
// register holds while sample_en is low. It counts how often each mechanism
// occurred (feedback, cascade input, held cycles, wrap-around of the sum,
// reset with history) and fails if one never did.
module tb_qrs_filter;

  import qrs_filter_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n, sample_en, out_valid;
  data_t  x_in, cascade_in, y_out, x_chain_out, y_chain_out;
  coefs_t coefs;

  int checks = 0;
  int failures = 0;

  // Mechanism counters
  int n_feedback = 0;
  int n_cascade  = 0;
  int n_hold     = 0;
  int n_wrap     = 0;
  int n_reset    = 0;

  // Reference state
  longint m_x1, m_y1, m_y2, m_c1;

  qrs_filter dut (
    .clk         (clk),
    .rst_n       (rst_n),
    .sample_en   (sample_en),
    .x_in        (x_in),
    .coefs       (coefs),
    .cascade_in  (cascade_in),
    .y_out       (y_out),
    .out_valid   (out_valid),
    .x_chain_out (x_chain_out),
    .y_chain_out (y_chain_out)
  );

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint wrap16(input longint v);
    return longint'(data_t'(v));
  endfunction

  function automatic longint scale(input longint v, input longint c);
    longint p;
    p = v * c;
    return (p >= 0) ? p / 16384 : -((-p + 16383) / 16384);
  endfunction

  task automatic model_reset();
    m_x1 = 0; m_y1 = 0; m_y2 = 0; m_c1 = 0;
  endtask

  // Drive one clock cycle. With en set, the sample is accepted and y_out is
  // compared with the model one cycle later; with en clear, all outputs
  // must hold.
  task automatic step(input bit en, input longint x, input longint c);
    longint exact, yn;
    data_t  y_before, xc_before, yc_before;
    y_before  = y_out;
    xc_before = x_chain_out;
    yc_before = y_chain_out;
    sample_en  = en;
    x_in       = data_t'(x);
    cascade_in = data_t'(c);
    exact = scale(x, longint'(coefs.a1)) + scale(m_x1, longint'(coefs.a2)) + scale(m_y1, longint'(coefs.b2))
          + scale(m_y2, longint'(coefs.b3)) + m_c1;
    @(posedge clk);
    #1;
    sample_en = 1'b0;
    checks++;
    if (out_valid !== en) begin
      failures++;
      $display("FAIL out_valid=%0b one cycle after sample_en=%0b", out_valid, en);
    end
    if (en) begin
      if (scale(m_y1, longint'(coefs.b2)) != 0 || scale(m_y2, longint'(coefs.b3)) != 0) n_feedback++;
      if (m_c1 != 0) n_cascade++;
      if (exact > 32767 || exact < -32768) n_wrap++;
      yn   = wrap16(exact);
      m_y2 = m_y1;
      m_y1 = yn;
      m_x1 = wrap16(x);
      m_c1 = wrap16(c);
      checks++;
      if (longint'(y_out) != m_y1 || longint'(x_chain_out) != m_x1
          || longint'(y_chain_out) != m_y2) begin
        failures++;
        $display("FAIL y_out=%0d x_chain=%0d y_chain=%0d, expected %0d %0d %0d",
                 y_out, x_chain_out, y_chain_out, m_y1, m_x1, m_y2);
      end
    end else begin
      n_hold++;
      checks++;
      if (y_out != y_before || x_chain_out != xc_before || y_chain_out != yc_before) begin
        failures++;
        $display("FAIL outputs changed while sample_en was low");
      end
    end
  endtask

  // Synthetic heartbeat: a narrow triangular spike every 40 samples on a
  // slow baseline wander
  function automatic longint ecg_sample(input int n);
    int phase;
    int v;
    phase = n % 40;
    v = 200 * ((n / 10) % 4) - 300;
    if (phase >= 10 && phase < 14) v += (phase - 9) * 2500;
    else if (phase >= 14 && phase < 18) v += (18 - phase) * 2500;
    return longint'(v);
  endfunction

  initial begin
    real expect_imp[5];
    expect_imp = '{0.25, 0.625, 0.28125, 0.0625, -0.00390625};

    rst_n = 1'b0; sample_en = 1'b0; x_in = '0; cascade_in = '0;
    coefs = '0;
    model_reset();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // Phase 1: impulse response of y = 0.25x[n] + 0.5x[n-1] + 0.5y[n-1]
    // - 0.125y[n-2]; impulse height 4096, so h[k] * 4096 is exact.
    coefs = '{a1: 16'sd4096, a2: 16'sd8192, b2: 16'sd8192, b3: -16'sd2048};
    for (int k = 0; k < 5; k++) begin
      step(1'b1, (k == 0) ? 4096 : 0, 0);
      checks++;
      if (real'(y_out) != expect_imp[k] * 4096.0) begin
        failures++;
        $display("FAIL impulse h[%0d]: y=%0d expected %0f", k, y_out, expect_imp[k] * 4096.0);
      end
    end

    // Phase 2: heartbeat-like input through the same section, one sample
    // every third clock
    for (int n = 0; n < 400; n++) begin
      step(1'b1, ecg_sample(n), 0);
      step(1'b0, 0, 0);
      step(1'b0, 0, 0);
    end

    // Phase 3: random coefficients, samples, cascade input and enable gaps
    for (int blk = 0; blk < 20; blk++) begin
      coefs = coefs_t'({$urandom, $urandom});
      for (int n = 0; n < 200; n++) begin
        step(1'($urandom_range(0, 3) != 0), longint'(data_t'($urandom)),
             longint'(data_t'($urandom)));
      end
    end

    // Phase 4: reset with history in the delay lines, then restart
    if (y_out != 0 || y_chain_out != 0 || x_chain_out != 0) n_reset++;
    rst_n = 1'b0;
    #1;
    checks++;
    if (y_out != 0 || y_chain_out != 0 || x_chain_out != 0 || out_valid != 0) begin
      failures++;
      $display("FAIL reset did not clear the filter");
    end
    model_reset();
    @(posedge clk); #1 rst_n = 1'b1;
    coefs = '{a1: 16'sd4096, a2: 16'sd8192, b2: 16'sd8192, b3: -16'sd2048};
    for (int k = 0; k < 5; k++) begin
      step(1'b1, (k == 0) ? 4096 : 0, 0);
      checks++;
      if (real'(y_out) != expect_imp[k] * 4096.0) begin
        failures++;
        $display("FAIL impulse after reset h[%0d]: y=%0d", k, y_out);
      end
    end

    $display("mechanisms: feedback=%0d cascade=%0d hold=%0d wrap=%0d reset=%0d",
             n_feedback, n_cascade, n_hold, n_wrap, n_reset);
    checks++;
    if (n_feedback == 0 || n_cascade == 0 || n_hold == 0 || n_wrap == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
