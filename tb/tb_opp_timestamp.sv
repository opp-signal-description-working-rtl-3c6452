// tb_opp_timestamp: self-checking test of the time stamp resynchronisation.
//
// A master sends, one bit per cell time (a ts_valid pulse every 16 CLK), a
// start bit, a 32-bit time stamp most significant bit first, and then 32 or
// more zero bits. A reference model, written as a bit collector with its own
// state counter, predicts the time stamp after every CLK: it counts cell
// times and is overwritten 33 bits after any "1" it sees while idle.
// Part 1 sends random values and checks every load. Part 2 is the worst case
// of the pin description: the block leaves reset just after the start bit of
// the value 0x00000001 and must hold the master's value no later than the
// 97th cell time.
module tb_opp_timestamp;
  logic clk = 0, rst = 1, ts_bit = 0, ts_valid = 0;
  logic [31:0] time_stamp;
  logic loaded;
  int checks = 0, failures = 0, loads = 0, good_loads = 0;

  opp_timestamp #(.TS_W(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  int          m_state = -1;      // -1 idle, else bits collected after start
  logic [31:0] m_val, m_ts;
  bit          m_load_next = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  // one CLK of the reference model, applied at each posedge
  always @(posedge clk) begin
    if (rst) begin
      m_state = -1; m_ts = 0; m_load_next = 0;
    end else if (m_load_next) begin
      m_ts = m_val; m_load_next = 0; m_state = -1;
    end else if (ts_valid) begin
      m_ts = m_ts + 1;
      if (m_state < 0) begin
        if (ts_bit) begin m_state = 0; m_val = 0; end
      end else begin
        m_val = {m_val[30:0], ts_bit};
        m_state++;
        if (m_state == 32) m_load_next = 1;
      end
    end
    #1;
    check("time_stamp", time_stamp, m_ts);
    if (loaded) loads++;
  end

  // send one bit in one cell time (16 CLK)
  task automatic send_bit(logic b);
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      ts_valid = (i == 0);
      ts_bit   = b;
    end
  endtask

  task automatic send_value(logic [31:0] v);
    send_bit(1'b1);
    for (int i = 31; i >= 0; i--) send_bit(v[i]);
    send_bit(1'b0);  // the load happens on the CLK after the last bit
    check("value loaded", time_stamp, v + 32'd1);
    if (time_stamp == v + 32'd1) good_loads++;
    for (int i = 1; i < 32; i++) send_bit(1'b0);
  endtask

  logic [31:0] v;
  int pulses;
  initial begin
    repeat (20) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 12; k++) begin
      v = $urandom;
      send_value(v);
    end
    check("loads counted", loads, 12);

    // worst case: reset removed just after the start bit of 0x00000001
    @(negedge clk); rst = 1;
    repeat (20) @(negedge clk);
    rst = 0;
    pulses = 0;
    for (int i = 31; i >= 0; i--) begin send_bit(i == 0); pulses++; end
    for (int i = 0; i < 32; i++) begin send_bit(1'b0); pulses++; end
    v = 32'h1234_5678;   // master's next value
    send_bit(1'b1); pulses++;
    for (int i = 31; i >= 0; i--) begin send_bit(v[i]); pulses++; end
    // load happens on the CLK after the 97th bit pulse
    check("worst-case cell times", pulses, 97);
    check("synchronised by cell 97", time_stamp, v);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
