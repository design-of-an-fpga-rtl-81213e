// tb_axis_reg: streams numbered words through the register slice with random
// TVALID and TREADY, checks order and completeness with a scoreboard, checks
// the AXI-stream rule that a stalled output holds its word, and checks that
// with TREADY always high the slice passes one word per clock.
module tb_axis_reg;
  localparam int W = 32;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] s_tdata, m_tdata;
  logic s_tvalid = 0, s_tready, m_tvalid, m_tready = 0;
  int checks = 0, failures = 0;
  int sent = 0, rcvd = 0, stalls = 0;
  logic [W-1:0] last_m;
  logic         last_stall = 0;
  int valid_pct = 70, ready_pct = 60;

  axis_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // driver and monitor, sampled just before each rising edge
  always @(negedge clk) if (rst_n) begin
    // output side: protocol and scoreboard for the edge that just passed
    if (last_stall) begin
      checks++;
      if (!m_tvalid || m_tdata !== last_m) begin
        failures++;
        $display("FAIL stalled word changed");
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (m_tvalid && m_tready) begin
      checks++;
      if (m_tdata !== W'(rcvd)) begin
        failures++;
        $display("FAIL got %0d expected %0d", m_tdata, rcvd);
      end
      rcvd <= rcvd + 1;
    end
    last_stall <= m_tvalid && !m_tready;
    last_m     <= m_tdata;
    if (m_tvalid && !m_tready) stalls <= stalls + 1;
    if (s_tvalid && s_tready) sent <= sent + 1;
  end

  always @(negedge clk) if (rst_n) begin
    if (!(s_tvalid && !s_tready)) begin
      s_tvalid <= ($urandom % 100) < valid_pct;
    end
    m_tready <= ($urandom % 100) < ready_pct;
  end
  assign s_tdata = W'(sent);

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (3000) @(posedge clk);
    // full-rate phase
    valid_pct = 100; ready_pct = 100;
    repeat (5) @(posedge clk);
    t0 = rcvd;
    repeat (100) @(posedge clk);
    checks++;
    if (rcvd - t0 != 100) begin
      failures++;
      $display("FAIL throughput %0d words in 100 clocks", rcvd - t0);
    end
    valid_pct = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (rcvd != sent || stalls == 0) begin
      failures++;
      $display("FAIL sent %0d received %0d stalls %0d", sent, rcvd, stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
