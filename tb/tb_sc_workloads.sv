// Runs the configurations whose complexity the design is evaluated at:
// RS(255, 239, 8) with 1, 2, 4 and 6 symbols per clock, and RS(255, 255-2t, t)
// with 8 symbols per clock for t = 4, 6, 10 and 16.  (p = 8, t = 8 is the
// default configuration, run by tb_rs_syndrome_calc.)  Each configuration
// decodes a few words, clean and corrupted, and checks syndromes and latency.
module tb_sc_workloads;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 8;
  int cfg_checks   [NCFG];
  int cfg_failures [NCFG];
  bit cfg_done     [NCFG];

  tb_sc_config #(.P(1), .T(8))  c_p1  (.clk, .rst_n, .checks(cfg_checks[0]), .failures(cfg_failures[0]), .done(cfg_done[0]));
  tb_sc_config #(.P(2), .T(8))  c_p2  (.clk, .rst_n, .checks(cfg_checks[1]), .failures(cfg_failures[1]), .done(cfg_done[1]));
  tb_sc_config #(.P(4), .T(8))  c_p4  (.clk, .rst_n, .checks(cfg_checks[2]), .failures(cfg_failures[2]), .done(cfg_done[2]));
  tb_sc_config #(.P(6), .T(8))  c_p6  (.clk, .rst_n, .checks(cfg_checks[3]), .failures(cfg_failures[3]), .done(cfg_done[3]));
  tb_sc_config #(.P(8), .T(4))  c_t4  (.clk, .rst_n, .checks(cfg_checks[4]), .failures(cfg_failures[4]), .done(cfg_done[4]));
  tb_sc_config #(.P(8), .T(6))  c_t6  (.clk, .rst_n, .checks(cfg_checks[5]), .failures(cfg_failures[5]), .done(cfg_done[5]));
  tb_sc_config #(.P(8), .T(10)) c_t10 (.clk, .rst_n, .checks(cfg_checks[6]), .failures(cfg_failures[6]), .done(cfg_done[6]));
  tb_sc_config #(.P(8), .T(16)) c_t16 (.clk, .rst_n, .checks(cfg_checks[7]), .failures(cfg_failures[7]), .done(cfg_done[7]));

  int checks;
  int failures;

  function automatic bit all_done();
    foreach (cfg_done[k]) if (!cfg_done[k]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    while (!all_done()) @(posedge clk);
    checks   = 0;
    failures = 0;
    foreach (cfg_checks[k]) begin
      checks   += cfg_checks[k];
      failures += cfg_failures[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    checks   = 0;
    failures = 1;
    foreach (cfg_checks[k]) begin
      checks   += cfg_checks[k];
      failures += cfg_failures[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
