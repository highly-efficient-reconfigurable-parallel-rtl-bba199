// tb_delta_decoder: random node and arc records, coded by a model of the host encoder
// (delta packets where the differences fit in a signed byte, full packets otherwise),
// fed byte by byte with gaps and random back-pressure on the command side. Every
// decoded command must equal the record that was coded, with the compressed flag
// matching the packet kind. Halfway a clear resets the references on both sides. Both
// packet forms of both kinds must occur.
module tb_delta_decoder;
  import bk_pkg::*;
  localparam int W = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] in_data;
  logic in_valid, in_ready, out_valid, out_ready, out_compressed, idle, clear;
  cmd_t out_cmd;
  int checks = 0, failures = 0;
  int n_kind[4];

  delta_decoder dut (.clk, .rst_n, .clear, .in_data, .in_valid, .in_ready, .out_cmd,
                     .out_compressed, .out_valid, .out_ready, .idle);

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

  byte unsigned bq[$];
  cmd_t         eq[$];
  bit           cq[$];
  int r_node, r_cs, r_ct, r_arc, r_cap, r_rev;

  function automatic bit fits(int d);
    return d >= -128 && d <= 127;
  endfunction

  function automatic void reset_refs();
    r_node = -1; r_cs = 0; r_ct = 0; r_arc = 0; r_cap = 0; r_rev = 0;
  endfunction

  function automatic void add_node(int id, int cs, int ct);
    cmd_t c = '0;
    c.op = CMD_NODE; c.i = GID_W'(id); c.a = CAP_W'(cs); c.b = CAP_W'(ct);
    if (id == r_node + 1 && fits(cs - r_cs) && fits(ct - r_ct)) begin
      bq.push_back(8'h40); bq.push_back(8'(cs - r_cs)); bq.push_back(8'(ct - r_ct));
      cq.push_back(1); n_kind[1]++;
    end else begin
      bq.push_back({2'b00, 6'(id >> 8)}); bq.push_back(8'(id));
      bq.push_back(8'(cs >> 8)); bq.push_back(8'(cs)); bq.push_back(8'(ct >> 8)); bq.push_back(8'(ct));
      cq.push_back(0); n_kind[0]++;
    end
    eq.push_back(c);
    r_node = id; r_cs = cs; r_ct = ct;
  endfunction

  function automatic void add_arc(int i, int dir, int cap, int rev);
    cmd_t c = '0;
    int j;
    j = (dir == 0) ? i + 1 : (dir == 1) ? i - 1 : (dir == 2) ? i + W : i - W;
    c.op = CMD_ARC; c.i = GID_W'(i); c.j = GID_W'(j); c.a = CAP_W'(cap); c.b = CAP_W'(rev);
    if (fits(i - r_arc) && fits(cap - r_cap) && fits(rev - r_rev)) begin
      bq.push_back({6'b110000, 2'(dir)}); bq.push_back(8'(i - r_arc));
      bq.push_back(8'(cap - r_cap)); bq.push_back(8'(rev - r_rev));
      cq.push_back(1); n_kind[3]++;
    end else begin
      bq.push_back({2'b10, 6'(i >> 8)}); bq.push_back(8'(i));
      bq.push_back({2'b00, 6'(j >> 8)}); bq.push_back(8'(j));
      bq.push_back(8'(cap >> 8)); bq.push_back(8'(cap)); bq.push_back(8'(rev >> 8)); bq.push_back(8'(rev));
      cq.push_back(0); n_kind[2]++;
    end
    eq.push_back(c);
    r_arc = i; r_cap = cap; r_rev = rev;
  endfunction

  task automatic make_records(int n);
    int id = 0, cs = 100, ct = 100, ai = 40, cap = 50, rev = 50;
    for (int k = 0; k < n; k++) begin
      if ($urandom % 2) begin
        id = ($urandom % 5 == 0) ? $urandom % 1024 : id + 1;
        cs = ($urandom % 5 == 0) ? $urandom % 65536 : (cs + int'($urandom % 61) - 30) & 16'hffff;
        ct = ($urandom % 5 == 0) ? $urandom % 65536 : (ct + int'($urandom % 61) - 30) & 16'hffff;
        add_node(id, cs, ct);
      end else begin
        ai = ($urandom % 6 == 0) ? 40 + $urandom % 900 : ai + int'($urandom % 3);
        cap = ($urandom % 6 == 0) ? $urandom % 65536 : (cap + int'($urandom % 41) - 20) & 16'hffff;
        rev = (rev + int'($urandom % 41) - 20) & 16'hffff;
        add_arc(ai, $urandom % 4, cap, rev);
      end
    end
  endtask

  task automatic run();
    int got = 0, want;
    want = eq.size();
    while (got < want) begin
      in_valid  <= bq.size() > 0 && ($urandom % 10) < 8;
      in_data   <= (bq.size() > 0) ? bq[0] : 8'h00;
      out_ready <= ($urandom % 10) < 6;
      @(negedge clk);
      if (out_valid && out_ready) begin
        check(out_cmd === eq[0], $sformatf("command %0d: got %p expected %p", got, out_cmd, eq[0]));
        check(out_compressed === cq[0], "compressed flag wrong");
        void'(eq.pop_front());
        void'(cq.pop_front());
        got++;
      end
      if (in_valid && in_ready) void'(bq.pop_front());
      @(posedge clk);
    end
    in_valid <= 0;
    @(negedge clk);
    check(idle, "not idle after the last packet");
    @(posedge clk);
  endtask

  initial begin
    in_valid = 0; in_data = 0; out_ready = 0; clear = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    reset_refs();
    make_records(1500);
    run();
    clear <= 1; @(posedge clk); clear <= 0;
    reset_refs();
    make_records(1500);
    run();
    for (int k = 0; k < 4; k++) check(n_kind[k] > 0, $sformatf("packet kind %0d never used", k));
    $display("packets: node_u=%0d node_c=%0d arc_u=%0d arc_c=%0d", n_kind[0], n_kind[1], n_kind[2], n_kind[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
