// page_select_reg_tb: testbench of the page-select register at 32 pages.
// Random writes (index, enable) and idle cycles; after every edge psel must
// be one-hot for the last enabled write, zero after a disabling write or
// reset, and unchanged when we = 0.
module page_select_reg_tb;
  localparam int unsigned PAGES = 32;
  localparam int unsigned PW    = sca_pkg::page_width(PAGES);

  logic clk = 1'b0, rst = 1'b0;
  logic we, en;
  logic [PW-1:0] page;
  logic [PAGES-1:0] psel, exp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  page_select_reg #(.PAGES(PAGES)) dut (.clk(clk), .rst(rst), .we(we), .page(page), .en(en), .psel(psel));

  initial #1 rst = 1'b1;  // a real edge, so the asynchronous reset acts

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; en = 0; page = '0; exp = '0;
    @(negedge clk);
    checks++;
    if (psel !== '0) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;
    for (int c = 0; c < 500; c++) begin
      @(negedge clk);
      we   = (c < 40) ? 1'b1 : 1'($urandom_range(0, 2) == 0);
      en   = (c < 32) ? 1'b1 : 1'($urandom_range(0, 4) != 0);
      page = (c < 32) ? PW'(c) : PW'($urandom);
      if (we) exp = en ? (PAGES'(1) << page) : '0;
      @(posedge clk);
      #1;
      checks++;
      if (psel !== exp) begin
        failures++;
        $display("FAIL cycle %0d: psel=%h expected %h", c, psel, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
