// End-to-end test of noc_encoding_top at its default width (W = 8).
//
// Two traffic phases, each a mix of packets (one header flit, a run of body
// flits, one tail flit) with idle cycles between some flits:
//   random     - uniformly random payloads;
//   correlated - payloads of a slowly varying signal (a triangle wave plus
//                small random steps), as sampled data would be.
// Every cycle the three link values are compared with a reference model that
// remembers the previous link value of each scheme, and every decoded payload
// must appear on all three outputs exactly two cycles after its flit was
// offered. For each body flit the encoded value may not have a higher
// coupling activity than the plain flit would have had on the same link.
// The test counts how often each mechanism occurred (every inversion action
// of every scheme, header/tail flits sent plain, idle cycles holding the
// link, a reset mid-stream) and fails if one never did. It prints the
// coupling and 0->1 self activity of each scheme and of the plain payload.
module tb_noc_encoding_top;
  import link_ref_pkg::*;
  localparam int W = 8;
  localparam int NL1 = link_lines(1, W);
  localparam int NL2 = link_lines(2, W);

  logic clk = 1'b0, rst = 1'b1, enb = 1'b0, flit_body = 1'b0;
  logic [W-2:0] payload = '0;
  logic [W-1:0] link_s1;
  logic [W:0]   link_s2, link_s3;
  logic         link_valid, out_valid, out_body;
  logic [W-2:0] out_s1, out_s2, out_s3;

  int checks = 0, failures = 0;
  int act[3][4];
  int n_plain = 0, n_idle = 0, n_reset = 0;
  int cc[4], su[4];
  lines_t m[3];
  lines_t raw_prev;

  typedef struct packed {
    logic [W-2:0] pay;
    logic         body;
  } exp_t;
  exp_t pipe[2];
  logic pipe_v[2];

  always #5 clk = ~clk;

  noc_encoding_top dut (
    .clk(clk), .rst(rst), .enb(enb), .flit_body(flit_body), .payload(payload),
    .link_s1(link_s1), .link_s2(link_s2), .link_s3(link_s3), .link_valid(link_valid),
    .out_s1(out_s1), .out_s2(out_s2), .out_s3(out_s3), .out_valid(out_valid), .out_body(out_body));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic lines_t got(int s);
    return (s == 0) ? lines_t'(link_s1) : (s == 1) ? lines_t'(link_s2) : lines_t'(link_s3);
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic do_reset();
    rst = 1'b1;
    enb = 1'b0;
    @(posedge clk);
    @(posedge clk);
    #1;
    for (int s = 0; s < 3; s++) begin
      check(got(s) == 0, "link cleared by reset");
      m[s] = 0;
    end
    check(!link_valid && !out_valid, "valid cleared by reset");
    raw_prev = 0;
    pipe_v[0] = 1'b0;
    pipe_v[1] = 1'b0;
    rst = 1'b0;
  endtask

  // One clock cycle: offer (or not) a flit, update the models, check.
  task automatic cycle(bit v, bit body, logic [W-2:0] p);
    enb = v;
    flit_body = body;
    payload = p;
    if (!v) n_idle++;
    if (v && !body) n_plain++;
    for (int s = 0; s < 3; s++) begin
      if (v) begin
        int nl = link_lines(s + 1, W);
        if (body) begin
          int a = ref_action(s + 1, lines_t'(p), m[s], nl);
          lines_t z = apply(lines_t'(p), a, nl);
          check(coupling(m[s], z, nl) <= coupling(m[s], lines_t'(p), nl), "no coupling increase");
          act[s][a]++;
          cc[s] += coupling(m[s], z, nl);
          su[s] += self_up(m[s], z, nl);
          m[s] = z;
        end else begin
          m[s] = lines_t'(p);
        end
      end
    end
    if (v && body) begin
      cc[3] += coupling(raw_prev, lines_t'(p), W - 1);
      su[3] += self_up(raw_prev, lines_t'(p), W - 1);
    end
    if (v) raw_prev = lines_t'(p);
    @(posedge clk);
    #1;
    pipe[1] = pipe[0];
    pipe_v[1] = pipe_v[0];
    pipe[0] = '{pay: p, body: body};
    pipe_v[0] = v;
    for (int s = 0; s < 3; s++) check(got(s) == m[s], $sformatf("link s%0d", s + 1));
    check(link_valid == v, "link_valid one cycle after enb");
    check(out_valid == pipe_v[1], "out_valid two cycles after enb");
    if (pipe_v[1]) begin
      check(out_s1 == pipe[1].pay, "out_s1");
      check(out_s2 == pipe[1].pay, "out_s2");
      check(out_s3 == pipe[1].pay, "out_s3");
      check(out_body == pipe[1].body, "out_body");
    end
  endtask

  task automatic packet(bit correlated, ref int phase, input int len);
    logic [W-2:0] p;
    cycle(1'b1, 1'b0, (W-1)'($urandom));
    for (int k = 0; k < len; k++) begin
      if ($urandom % 10 == 0) cycle(1'b0, 1'b0, (W-1)'($urandom));
      if (correlated) begin
        phase = (phase + 1) % (2 ** W);
        p = (W-1)'((phase < 2 ** (W-1)) ? phase : 2 ** W - 1 - phase) ^ (W-1)'($urandom % 2);
      end else begin
        p = (W-1)'($urandom);
      end
      cycle(1'b1, 1'b1, p);
    end
    cycle(1'b1, 1'b0, (W-1)'($urandom));
  endtask

  initial begin
    int phase;
    phase = 0;
    act = '{default: 0};
    cc = '{default: 0};
    su = '{default: 0};
    do_reset();
    for (int n = 0; n < 150; n++) packet(1'b0, phase, 4 + $urandom % 12);
    $display("random:     coupling plain=%0d s1=%0d s2=%0d s3=%0d | self0->1 plain=%0d s1=%0d s2=%0d s3=%0d",
             cc[3], cc[0], cc[1], cc[2], su[3], su[0], su[1], su[2]);
    cc = '{default: 0};
    su = '{default: 0};
    n_reset++;
    do_reset();
    for (int n = 0; n < 150; n++) packet(1'b1, phase, 4 + $urandom % 12);
    $display("correlated: coupling plain=%0d s1=%0d s2=%0d s3=%0d | self0->1 plain=%0d s1=%0d s2=%0d s3=%0d",
             cc[3], cc[0], cc[1], cc[2], su[3], su[0], su[1], su[2]);
    for (int s = 0; s < 3; s++) begin
      $display("scheme %0d actions none=%0d odd=%0d even=%0d full=%0d", s + 1,
               act[s][0], act[s][1], act[s][2], act[s][3]);
      for (int a = 0; a < 4; a++)
        if (allowed(s + 1, a)) check(act[s][a] > 0, $sformatf("scheme %0d action %0d occurred", s + 1, a));
    end
    $display("plain header/tail flits=%0d idle cycles=%0d mid-stream resets=%0d", n_plain, n_idle, n_reset);
    check(n_plain > 0, "plain flits occurred");
    check(n_idle > 0, "idle cycles occurred");
    check(n_reset > 0, "mid-stream reset occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
