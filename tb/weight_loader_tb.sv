`timescale 1ns/1ps
// Testbench of weight_loader: checks the identity kernel after reset, that
// weights written while a frame is in flight (idle low) stay in the shadow
// bank with pending high, that they all become active in the cycle after
// idle rises, and that out-of-range indices are ignored.
// The expected values are computed in the testbench itself; the stimulus and
// the sizes are this testbench's own choice.
module weight_loader_tb;
  import nuc_pkg::*;
  localparam int NT = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en, idle, pending;
  logic [3:0] wr_idx;
  logic [WGT_W-1:0] wr_data;
  logic [NT-1:0][WGT_W-1:0] weights;
  int w_new [NT];
  int w_old [NT];

  weight_loader #(.NT(NT)) dut (.*);

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_idx = 0; wr_data = 0; idle = 0;
    #12 rst_n = 1;
    @(negedge clk);
    chk(weights[0] == 18'd65536, "reset centre");
    for (int j = 1; j < NT; j++) chk(weights[j] == 0, "reset side");
    chk(!pending, "reset pending");
    w_old[0] = 65536;
    for (int j = 1; j < NT; j++) w_old[j] = 0;
    // frame in flight: write all weights
    for (int round = 0; round < 3; round++) begin
      idle = 0;
      for (int j = 0; j < NT; j++) begin
        w_new[j] = $urandom_range(0, 65536);
        wr_en = 1; wr_idx = 4'(j); wr_data = WGT_W'(w_new[j]);
        @(negedge clk);
      end
      wr_en = 1; wr_idx = 4'(NT); wr_data = '1;     // out of range, ignored
      @(negedge clk);
      wr_en = 0;
      repeat (5) @(negedge clk);
      chk(pending, "pending while busy");
      for (int j = 0; j < NT; j++) chk(weights[j] == WGT_W'(w_old[j]), "no change while busy");
      idle = 1;
      @(negedge clk);
      for (int j = 0; j < NT; j++) chk(weights[j] == WGT_W'(w_new[j]), "committed at idle");
      chk(!pending, "pending cleared");
      w_old = w_new;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
