// tb_main_ctrl: checks the request sequences of the main control unit.
//
// The KAM and UPCU are replaced by small responders here: the KAM answers an
// operation with Keccak_done after a few cycles and then offers a counting
// 64-bit stream; the UPCU answers each start with UPCU_done after a random
// delay. The testbench logs every request and compares the log with the
// sequences expected for each command: direct polynomial function, direct
// KAM operation, Dilithium signing opening (SHAKE256, rho captured from the
// stream and hashed with SHAKE128, sampling, NTT s1, s2, t0) and Falcon
// signing opening (SHAKE256, random value, two multiplications, NTT).
module tb_main_ctrl;
  import pqc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, cmd_done;
  logic [1:0] cmd;
  scheme_e scheme; sec_t sec; pfunc_e pfunc;
  logic [2:0] src_a, src_b, dst;
  kop_e host_kop; logic [511:0] host_msg; logic [7:0] host_msg_len;
  logic host_cont, host_more, kam_op_cont, kam_op_more;
  logic [255:0] seed, rnd_out;
  logic kam_op_valid, kam_op_ready, kam_done, kam_buf_valid, kam_pop;
  kop_e kam_op; logic [511:0] kam_msg; logic [7:0] kam_msg_len; logic [63:0] kam_buf_data;
  logic upcu_start, upcu_done, join_evt;
  pfunc_e upcu_func; scheme_e upcu_scheme; sec_t upcu_sec;
  logic [2:0] upcu_src_a, upcu_src_b, upcu_dst;

  main_ctrl dut (.*);

  int checks = 0, failures = 0;

  // ------------------------------------------------------ KAM responder
  int k_wait;
  logic k_squeeze;
  logic [63:0] k_ctr;
  assign kam_op_ready  = (k_wait == 0);
  assign kam_buf_valid = k_squeeze;
  assign kam_buf_data  = k_ctr;
  always @(posedge clk) begin
    kam_done <= 1'b0;
    if (!rst_n) begin k_wait <= 0; k_squeeze <= 0; k_ctr <= 0; end
    else begin
      if (kam_op_valid && kam_op_ready) begin k_wait <= 5; k_squeeze <= 0; k_ctr <= 64'h1000; end
      else if (k_wait == 1) begin k_wait <= 0; kam_done <= 1; k_squeeze <= 1; end
      else if (k_wait > 1) k_wait <= k_wait - 1;
      if (kam_pop && k_squeeze) k_ctr <= k_ctr + 1;
    end
  end

  // ----------------------------------------------------- UPCU responder
  int u_wait;
  always @(posedge clk) begin
    upcu_done <= 1'b0;
    if (!rst_n) u_wait <= 0;
    else if (upcu_start) begin
      if (u_wait != 0) begin failures++; $display("FAIL start while busy"); end
      u_wait <= 2 + $urandom % 20;
    end else if (u_wait == 1) begin u_wait <= 0; upcu_done <= 1; end
    else if (u_wait > 1) u_wait <= u_wait - 1;
  end

  int n_join = 0;
  always @(posedge clk) if (rst_n && join_evt) n_join++;

  // ------------------------------------------------------------ request log
  string log [$];
  always @(posedge clk) if (rst_n) begin
    if (kam_op_valid && kam_op_ready)
      log.push_back($sformatf("K %0d %0d %0d%0d %h", kam_op, kam_msg_len, kam_op_cont, kam_op_more, kam_msg[255:0]));
    if (upcu_start)
      log.push_back($sformatf("U %s %0d %0d %0d", upcu_func.name(), upcu_src_a, upcu_src_b, upcu_dst));
  end

  task automatic do_cmd(logic [1:0] c);
    int n;
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(negedge clk) cmd_valid = 0;
    n = 0;
    while (!cmd_done && n < 5000) begin @(negedge clk); n++; end
    checks++;
    if (!cmd_done) begin failures++; $display("FAIL command %0d never finished", c); end
  endtask

  task automatic expect_log(string e [$]);
    checks++;
    if (log.size() != e.size()) begin
      failures++;
      $display("FAIL log has %0d entries, expected %0d", log.size(), e.size());
      foreach (log[i]) $display("  got %s", log[i]);
    end else
      foreach (e[i]) if (log[i] != e[i]) begin
        failures++;
        $display("FAIL entry %0d: got '%s' expected '%s'", i, log[i], e[i]);
      end
    log.delete();
  endtask

  initial begin
    string e [$];
    logic [255:0] rho_exp;
    cmd_valid = 0; cmd = 0; scheme = SCH_DILITHIUM; sec = 0; pfunc = PF_ADD;
    src_a = 1; src_b = 2; dst = 3; host_kop = KOP_SHAKE128; host_msg = '0; host_msg_len = 0; host_cont = 0; host_more = 0;
    seed = {8{$urandom}};
    host_msg = {16{$urandom}};
    repeat (3) @(negedge clk);
    rst_n = 1;

    // direct polynomial function
    do_cmd(2'd0);
    e = '{"U PF_ADD 1 2 3"};
    expect_log(e);

    // direct KAM operation
    host_msg_len = 8'd20;
    do_cmd(2'd1);
    e = '{$sformatf("K %0d 20 00 %h", KOP_SHAKE128, host_msg[255:0])};
    expect_log(e);

    // a chunk with more to follow ends when accepted, without Keccak_done
    host_cont = 1; host_more = 1;
    do_cmd(2'd1);
    e = '{$sformatf("K %0d 20 11 %h", KOP_SHAKE128, host_msg[255:0])};
    expect_log(e);
    host_cont = 0; host_more = 0;
    repeat (10) @(negedge clk);

    // Dilithium signing opening
    do_cmd(2'd2);
    rho_exp = {64'h1003, 64'h1002, 64'h1001, 64'h1000};
    e = '{$sformatf("K %0d 32 00 %h", KOP_SHAKE256, seed),
          $sformatf("K %0d 34 00 %h", KOP_SHAKE128, rho_exp),
          "U PF_SAMPLE 0 0 0", "U PF_NTT 1 0 4", "U PF_NTT 2 0 5", "U PF_NTT 3 0 6"};
    expect_log(e);
    checks++;
    if (n_join != 1) begin failures++; $display("FAIL join seen %0d times", n_join); end

    // Falcon signing opening
    scheme = SCH_FALCON;
    do_cmd(2'd3);
    e = '{$sformatf("K %0d 32 00 %h", KOP_SHAKE256, seed),
          "U PF_PMUL 1 2 4", "U PF_PMUL 4 3 5", "U PF_NTT 5 0 6"};
    expect_log(e);
    checks++;
    if (rnd_out != {64'h1003, 64'h1002, 64'h1001, 64'h1000}) begin
      failures++; $display("FAIL rnd_out %h", rnd_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
