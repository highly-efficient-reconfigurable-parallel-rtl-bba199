// tb_load_arbiter: random packets of all four kinds through the arbiter at 16 cores.
// The model expects packet k on core k mod 16, byte for byte and in order, whatever the
// per-core back-pressure; it also checks that at most one core is offered a byte, that
// the bus is held (stall) only while the selected FIFO refuses, and that pkt_boundary is
// high exactly between packets.
module tb_load_arbiter;
  import bk_pkg::*;
  localparam int NC = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] in_data, out_data;
  logic in_valid, in_ready, stall, pkt_boundary;
  logic [NC-1:0] out_valid, out_ready;
  int checks = 0, failures = 0, n_stall = 0, n_bytes = 0;
  byte unsigned bytes_in[$];
  bit          first_of_pkt[$];
  byte unsigned expect_q[NC][$];

  load_arbiter dut (.clk, .rst_n, .in_data, .in_valid, .in_ready, .out_data, .out_valid,
                    .out_ready, .stall, .pkt_boundary);

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int len, k;
    in_valid = 0; in_data = 0; out_ready = '0;
    // build the packet stream and the per-core expectation
    for (int p = 0; p < 600; p++) begin
      k = $urandom % 4;
      len = (k == 0) ? 6 : (k == 1) ? 3 : (k == 2) ? 8 : 4;
      for (int b = 0; b < len; b++) begin
        byte unsigned v;
        v = (b == 0) ? {2'(k), 6'($urandom)} : 8'($urandom);
        bytes_in.push_back(v);
        first_of_pkt.push_back(b == 0);
        expect_q[p % NC].push_back(v);
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (bytes_in.size() > 0) begin
      in_valid  <= ($urandom % 10) < 8;
      in_data   <= bytes_in[0];
      out_ready <= NC'({$urandom, $urandom}) | NC'({$urandom, $urandom});
      @(negedge clk);
      check($onehot0(out_valid), "more than one core offered a byte");
      check(pkt_boundary === first_of_pkt[0], "pkt_boundary wrong");
      check(stall === (in_valid && !in_ready), "stall wrong");
      if (stall) n_stall++;
      for (int c = 0; c < NC; c++)
        if (out_valid[c] && out_ready[c]) begin
          check(expect_q[c].size() > 0 && out_data === expect_q[c][0],
                $sformatf("core %0d got %0h", c, out_data));
          if (expect_q[c].size() > 0) void'(expect_q[c].pop_front());
        end
      if (in_valid && in_ready) begin
        void'(bytes_in.pop_front());
        void'(first_of_pkt.pop_front());
        n_bytes++;
      end
      @(posedge clk);
    end
    in_valid <= 0;
    for (int c = 0; c < NC; c++) check(expect_q[c].size() == 0, $sformatf("core %0d missing bytes", c));
    check(n_stall > 0, "no stall seen");
    $display("bytes=%0d stalls=%0d", n_bytes, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
