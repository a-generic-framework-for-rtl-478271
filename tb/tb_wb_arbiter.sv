// tb_wb_arbiter: self-checking testbench of the bus arbiter (3 masters).
// A reference model in this file keeps its own owner and round-robin
// pointer; random request patterns are applied for many clocks and the
// grant is compared with the model every clock.  Also checks directed
// cases: a master keeps the bus while it holds cyc, and the grant rotates
// when all masters request with short cycles.
module tb_wb_arbiter;
  localparam int NM = 3;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [NM-1:0] req, gnt;
  logic [1:0]    gidx;
  logic          gvalid;

  int checks = 0, failures = 0;

  wb_arbiter #(.NM(NM)) dut (.clk(clk), .rst(rst), .req_i(req), .gnt_o(gnt),
                             .gnt_idx_o(gidx), .gnt_valid_o(gvalid));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // reference model
  int  m_owner = 0, m_last = NM - 1;
  bit  m_locked = 0;
  function automatic int model_grant(input logic [NM-1:0] r);
    if (m_locked && r[m_owner]) return m_owner;
    for (int k = 1; k <= NM; k++) if (r[(m_last + k) % NM]) return (m_last + k) % NM;
    return -1;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g, prev, rotations;
    req = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    // random: each master holds cyc for a random number of clocks
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (n % 3 == 0) req = NM'($urandom);
      #1;
      g = model_grant(req);
      check(gvalid == (g >= 0), "grant valid");
      if (g >= 0) check(int'(gidx) == g && gnt == NM'(1 << g), $sformatf("grant %0d expected %0d", gidx, g));
      else        check(gnt == '0, "no grant without request");
      @(posedge clk);
      m_locked = (g >= 0);
      if (g >= 0) begin m_owner = g; m_last = g; end
    end
    // directed: master 2 locks the bus although the others request
    @(negedge clk); req = 3'b000;
    @(negedge clk); req = 3'b100;
    @(negedge clk); req = 3'b111;
    for (int c = 0; c < 5; c++) begin
      #1; check(gnt == 3'b100, "owner keeps the bus while cyc is held");
      @(negedge clk);
    end
    // directed: single-clock cycles from all masters rotate the grant
    rotations = 0; prev = 2;
    for (int c = 0; c < 6; c++) begin
      req = 3'b000; @(negedge clk);
      req = 3'b111; #1;
      if (int'(gidx) == (prev + 1) % NM) rotations++;
      prev = int'(gidx);
      @(negedge clk);
    end
    check(rotations == 6, "round robin over all masters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
