// tb_load_reg: load_reg (8 bits) under random load/en/reset sequences,
// against a reference value kept here: reset clears, load has priority,
// en updates, otherwise the register holds.
module tb_load_reg;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, en = 1'b0;
  logic [W-1:0] load_val = '0, d = '0, q, model;
  int checks = 0, failures = 0, cycles = 0;

  load_reg #(.W(W)) dut (.clk, .rst_n, .load, .load_val, .en, .d, .q);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 10000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset value %h", q); end
    rst_n = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      load     = ($urandom % 4) == 0;
      en       = 1'($urandom);
      load_val = W'($urandom);
      d        = W'($urandom);
      @(posedge clk);
      if (load) model = load_val;
      else if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 5) $display("FAIL k=%0d load=%b en=%b q=%h exp %h", k, load, en, q, model);
      end
    end
    // asynchronous reset in mid-cycle
    @(negedge clk);
    rst_n = 1'b0;
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL async reset %h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
