// Self-checking testbench of sd_int_slice.
//
// Two slices are driven with random inputs: a 4-bit lower slice (no feedback,
// carry-out used) and an 11-bit top slice with a feedback word. A model of
// the register contents is updated every clock from the inputs applied, and
// state and carry_out are compared with it one clock later.
module tb_sd_int_slice;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic [3:0]  a_lo;
  logic        c_lo;
  logic [3:0]  st_lo;
  logic        co_lo;
  logic [10:0] a_top, fb_top, st_top;
  logic        c_top, co_top;

  sd_int_slice #(.W(4)) dut_lo (.clk(clk), .rst_n(rst_n), .add_in(a_lo), .fb('0),
                               .carry_in(c_lo), .state(st_lo), .carry_out(co_lo));
  sd_int_slice #(.W(11)) dut_top (.clk(clk), .rst_n(rst_n), .add_in(a_top), .fb(fb_top),
                                 .carry_in(c_top), .state(st_top), .carry_out(co_top));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m_lo, m_co, m_top, sum;
    a_lo = '0; c_lo = 1'b0; a_top = '0; fb_top = '0; c_top = 1'b0;
    repeat (2) @(posedge clk);
    checks++;
    if (st_lo != 0 || co_lo != 0 || st_top != 0) failures++;
    #1 rst_n = 1'b1;
    m_lo = 0; m_co = 0; m_top = 0;
    for (int i = 0; i < 2000; i++) begin
      a_lo = 4'($urandom); c_lo = 1'($urandom);
      a_top = 11'($urandom); fb_top = 11'($urandom); c_top = 1'($urandom);
      sum   = m_lo + int'(a_lo) + int'(c_lo);
      m_co  = sum / 16;
      m_lo  = sum % 16;
      m_top = (m_top + int'(a_top) + int'(c_top) - int'(fb_top)) & 11'h7FF;
      @(posedge clk);
      #1;
      checks += 3;
      if (int'(st_lo) != m_lo)   failures++;
      if (int'(co_lo) != m_co)   failures++;
      if (int'(st_top) != m_top) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
