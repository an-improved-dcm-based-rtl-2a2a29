// tb_address_gen - checks loading, stepping, wrapping and the refusal of
// addresses outside the 23 stored sets, against a reference register.
`timescale 1ns/1ps
module tb_address_gen;

  import trng_pkg::*;

  logic      clk = 1'b0, rst_n = 1'b1;
  logic      load = 1'b0, next = 1'b0;
  set_addr_t load_addr = '0, addr;
  logic      load_err;
  int        checks = 0, failures = 0;
  int        wraps = 0, refused = 0;

  address_gen dut (
    .clk(clk), .rst_n(rst_n), .load(load), .load_addr(load_addr),
    .next(next), .addr(addr), .load_err(load_err)
  );

  always #5 clk = ~clk;

  int ref_addr = 0;

  always @(posedge clk) begin
    logic exp_err;
    exp_err = 1'b0;
    if (rst_n) begin
      if (load) begin
        if (int'(load_addr) < 23) ref_addr = int'(load_addr);
        else begin exp_err = 1'b1; refused++; end
      end else if (next) begin
        if (ref_addr == 22) begin ref_addr = 0; wraps++; end
        else ref_addr++;
      end
      #1;
      checks++;
      if (int'(addr) != ref_addr || load_err != exp_err) begin
        failures++;
        $display("FAIL addr=%0d exp %0d err=%0b exp %0b", addr, ref_addr, load_err, exp_err);
      end
    end
  end

  // Reset falls shortly after time 0 so that asynchronous resets see an edge.
  initial #1 rst_n = 1'b0;

  initial begin
    repeat (2) @(posedge clk);
    checks++;
    if (addr != 0) failures++;
    @(negedge clk) rst_n = 1'b1;
    // Step through all sets twice.
    repeat (46) begin
      @(negedge clk) next = 1'b1;
      @(negedge clk) next = 1'b0;
    end
    // Random loads (some out of range) and steps.
    repeat (500) begin
      @(negedge clk);
      load      = ($urandom % 3 == 0);
      next      = ($urandom % 2 == 0);
      load_addr = set_addr_t'($urandom);
    end
    @(negedge clk) begin load = 1'b0; next = 1'b0; end
    repeat (2) @(negedge clk);
    checks++;
    if (wraps < 2 || refused == 0) failures++;
    $display("wraps=%0d refused=%0d", wraps, refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
