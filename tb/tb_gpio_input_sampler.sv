// tb_gpio_input_sampler: self-checking test of RGPIO_IN sampling.
// The system clock (10 ns) and gpio_eclk (14.2 ns, offset) are unrelated and
// their edges never coincide. Pads and the ECLK/NEC selections change 2.5 ns
// after a clk edge, away from every clk and gpio_eclk edge. A reference model
// keeps the pad value seen at the last rising and the last falling gpio_eclk
// edge, and the value RGPIO_IN must take at each rising clk edge: the pad
// itself for ECLK = 0, otherwise the rising (NEC = 0) or falling (NEC = 1)
// capture. RGPIO_IN is compared with the model after every clk edge, which
// also checks the one-clock sampling latency. Counts how often each of the
// three modes delivered a value that differs from the live pad.
`timescale 1ns/10ps
module tb_gpio_input_sampler;
  localparam int W = 32;
  logic clk = 0, eclk = 0, rst_n = 0;
  logic [W-1:0] pad, sel_eclk, sel_nec, rgpio_in;
  logic [W-1:0] m_pos, m_neg, m_in;
  int checks = 0, failures = 0;
  int n_sys = 0, n_pos = 0, n_neg = 0;

  gpio_input_sampler #(.GPIO_W(W)) dut (
    .clk, .rst_n, .gpio_eclk(eclk), .ext_pad_i(pad),
    .rgpio_eclk(sel_eclk), .rgpio_nec(sel_nec), .rgpio_in
  );

  always #5 clk = ~clk;
  initial begin
    #0.25;
    forever #7.1 eclk = ~eclk;
  end

  // reference model
  always @(posedge eclk) if (rst_n) m_pos <= pad;
  always @(negedge eclk) if (rst_n) m_neg <= pad;
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < W; i++)
      m_in[i] <= !sel_eclk[i] ? pad[i] : (sel_nec[i] ? m_neg[i] : m_pos[i]);

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (rgpio_in !== m_in) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t rgpio_in=%h exp=%h", $time, rgpio_in, m_in);
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pad = '0; sel_eclk = '0; sel_nec = '0;
    m_pos = '0; m_neg = '0; m_in = '0;
    // every stimulus change happens 2.5 ns after a clk edge, never on an edge
    #7.5;                                  // one clk edge has applied reset
    checks++;
    if (rgpio_in !== '0) failures++;
    rst_n = 1;
    // system-clock mode on all bits
    repeat (40) begin #5 pad = $urandom; end
    // rising gpio_eclk on all bits: pad changes between eclk edges are hidden
    #5 sel_eclk = '1; sel_nec = '0;
    repeat (60) begin #5 pad = $urandom; end
    // falling gpio_eclk on all bits
    #5 sel_nec = '1;
    repeat (60) begin #5 pad = $urandom; end
    // per-bit mixture
    repeat (20) begin
      #5 sel_eclk = $urandom; sel_nec = $urandom;
      repeat (20) begin #5 pad = $urandom; end
    end
    #20;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count mode activity: RGPIO_IN bits that follow a gpio_eclk capture which
  // differs from the pad level at that moment
  always @(negedge clk) if (rst_n)
    for (int i = 0; i < W; i++) begin
      if (!sel_eclk[i]) n_sys++;
      else if (sel_nec[i] && m_neg[i] != pad[i]) n_neg++;
      else if (!sel_nec[i] && m_pos[i] != pad[i]) n_pos++;
    end

  final begin
    $display("mode activity: system=%0d eclk_rise=%0d eclk_fall=%0d", n_sys, n_pos, n_neg);
  end
endmodule
