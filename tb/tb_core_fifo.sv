// tb_core_fifo: random pushes and pops against a queue model at the default depth of 16.
// Checks data order, that in_ready falls exactly when 16 words are held, that out_valid
// and empty follow the occupancy, and that filling and draining both happen.
module tb_core_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int DEPTH = 16;
  logic [7:0] in_data, out_data;
  logic in_valid, in_ready, out_valid, out_ready, empty;
  int checks = 0, failures = 0, n_full = 0, n_popped = 0;
  byte unsigned model[$];

  core_fifo dut (.clk, .rst_n, .in_data, .in_valid, .in_ready, .out_data, .out_valid,
                 .out_ready, .empty);

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // push-heavy first half, pop-heavy second half
      in_valid  <= ($urandom % 100) < ((cyc < 2000) ? 70 : 30);
      out_ready <= ($urandom % 100) < ((cyc < 2000) ? 30 : 70);
      in_data   <= 8'($urandom);
      @(negedge clk);
      check(in_ready === (model.size() < DEPTH), "in_ready does not match occupancy");
      check(out_valid === (model.size() > 0), "out_valid does not match occupancy");
      check(empty === (model.size() == 0), "empty does not match occupancy");
      if (model.size() == DEPTH) n_full++;
      if (out_valid && out_ready) begin
        check(out_data === model[0], $sformatf("data %0h, expected %0h", out_data, model[0]));
        void'(model.pop_front());
        n_popped++;
      end
      if (in_valid && in_ready) model.push_back(in_data);
      @(posedge clk);
    end
    check(n_full > 0, "FIFO never became full");
    check(n_popped > 1000, "too few words passed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
