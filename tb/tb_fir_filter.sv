// End-to-end testbench of fir_filter at its default size (8 taps).
//
// Programs the coefficient LUT, streams random samples with random idle
// cycles, rewrites coefficients while samples flow, resets in the middle
// and starts again. Every output is checked bit for bit against a model
// built from the multiplier's integer reference and against the exact
// filter sum (error below 5 LSB per tap), and must appear exactly one
// cycle after the edge that took its sample. Each mechanism must occur at
// least once: each kind of sub-expression reuse, negative and positive
// coefficients, idle input cycles, coefficient rewrites during streaming
// and a reset during operation.
module tb_fir_filter;
  import vhbcse_pkg::*;
  import vhbcse_ref_pkg::*;

  localparam int unsigned TAPS = 8;
  localparam int unsigned AW = $clog2(TAPS);
  localparam int unsigned OW = YW + AW;

  logic clk = 1'b0, rst_n = 1'b0;
  logic x_valid = 1'b0, coef_we = 1'b0;
  sample_t x_in = '0;
  logic [AW-1:0] coef_addr = '0;
  coef_t coef_wdata = '0;
  logic y_valid;
  logic [OW-1:0] y_out;

  fir_filter dut (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x_in(x_in),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_wdata(coef_wdata),
    .y_valid(y_valid), .y_out(y_out)
  );

  int unsigned hist [TAPS];
  int unsigned shadow [TAPS];
  int checks = 0, failures = 0, cycles = 0, outputs = 0;
  bit pending = 0;
  longint exp_y;
  real exp_exact;
  // mechanism counters
  int n_q2 = 0, n_q1 = 0, n_q0 = 0, n_byte = 0, n_neg = 0, n_pos = 0;
  int n_idle = 0, n_rewrite = 0, n_reset = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 50000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic int unsigned biased_coef();
    int unsigned nib[4];
    for (int n = 0; n < 4; n++) nib[n] = (($urandom % 2) != 0) ? ($urandom % 3) : ($urandom % 16);
    return (($urandom % 2) << 16) | (nib[3] << 12) | (nib[2] << 8) | (nib[1] << 4) | nib[0];
  endfunction

  // Counts the reuse that coefficient hv causes in its multiplier.
  task automatic count_reuse(input int unsigned hv);
    int unsigned hm, n3, n2, n1, n0;
    hm = hv[16] ? (~hv) & 32'hFFFF : hv & 32'hFFFF;
    n3 = (hm >> 12) & 15; n2 = (hm >> 8) & 15; n1 = (hm >> 4) & 15; n0 = hm & 15;
    if (n3 == n2) n_q2++;
    if (n3 == n1 || n2 == n1) n_q1++;
    if (n3 == n0 || n2 == n0 || n1 == n0) n_q0++;
    if ((hm >> 8) == (hm & 255)) n_byte++;
    if (hv[16]) n_neg++; else n_pos++;
  endtask

  // One clock cycle: apply inputs, take the edge, update the model, check.
  task automatic step(input bit v, input int unsigned x, input bit w,
                      input int unsigned a, input int unsigned d);
    longint acc;
    real ex;
    x_valid = v; x_in = sample_t'(x);
    coef_we = w; coef_addr = AW'(a); coef_wdata = coef_t'(d);
    @(posedge clk);
    if (w) begin
      shadow[a] = d & 32'h1FFFF;
      if (pending || v) n_rewrite++;
    end
    if (!v) n_idle++;
    // the output registered at this edge belongs to the previous sample
    #1;
    checks++;
    if (y_valid != pending) begin
      failures++;
      $display("FAIL cycle %0d: y_valid=%b expected %b", cycles, y_valid, pending);
    end
    if (pending && y_valid) begin
      outputs++;
      checks += 2;
      if (longint'($signed(y_out)) != exp_y) begin
        failures++;
        $display("FAIL y_out=%0d model=%0d", $signed(y_out), exp_y);
      end
      ex = real'(longint'($signed(y_out))) - exp_exact;
      if (ex < 0) ex = -ex;
      if (ex >= 5.0 * TAPS) begin
        failures++;
        $display("FAIL y_out=%0d exact=%f", $signed(y_out), exp_exact);
      end
    end
    pending = v;
    if (v) begin
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x & 32'hFFFF;
      acc = 0;
      ex = 0.0;
      for (int k = 0; k < TAPS; k++) begin
        acc += longint'(ref_y(hist[k], shadow[k]));
        ex  += real'(longint'(hist[k]) * longint'(coef_value(shadow[k]))) / 65536.0;
        count_reuse(shadow[k]);
      end
      exp_y = acc;
      exp_exact = ex;
    end
  endtask

  task automatic clear_model();
    for (int k = 0; k < TAPS; k++) begin
      hist[k] = 0;
      shadow[k] = 0;
    end
    pending = 0;
  endtask

  task automatic program_all();
    for (int k = 0; k < TAPS; k++) step(0, 0, 1, k, biased_coef());
  endtask

  task automatic stream(input int n);
    repeat (n) begin
      bit v, w;
      v = ($urandom % 5) != 0;
      w = ($urandom % 10) == 0;
      step(v, $urandom, w, $urandom % TAPS, biased_coef());
    end
  endtask

  initial begin
    clear_model();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    program_all();
    // a few full-scale samples against the largest coefficients
    for (int k = 0; k < TAPS; k++) step(0, 0, 1, k, ((k % 2) != 0) ? 32'h10000 : 32'h0FFFF);
    repeat (TAPS + 2) step(1, 65535, 0, 0, 0);
    stream(800);
    // reset in the middle of streaming
    x_valid = 1'b1; x_in = 16'h1234;
    rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    x_valid = 1'b0;
    n_reset++;
    clear_model();
    checks += 2;
    if (y_valid !== 1'b0) failures++;
    if (y_out != '0) failures++;
    step(1, 777, 0, 0, 0);       // all coefficients are zero after reset
    step(0, 0, 0, 0, 0);
    program_all();
    stream(800);
    step(0, 0, 0, 0, 0);
    step(0, 0, 0, 0, 0);

    $display("outputs=%0d reuse Q2=%0d Q1=%0d Q0=%0d byte=%0d neg=%0d pos=%0d idle=%0d rewrite=%0d reset=%0d",
             outputs, n_q2, n_q1, n_q0, n_byte, n_neg, n_pos, n_idle, n_rewrite, n_reset);
    checks++;
    if (n_q2 == 0 || n_q1 == 0 || n_q0 == 0 || n_byte == 0 || n_neg == 0 || n_pos == 0 ||
        n_idle == 0 || n_rewrite == 0 || n_reset == 0 || outputs < 100) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
