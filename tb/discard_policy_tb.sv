// discard_policy_tb: self-checking test of the packet discarding policies.
//
// With the default sizes (C = 16384 blocks, P = 3) the limits are
// C/6 = 2730.67, 2C/6 = 5461.33, 3C/6 = 8192 blocks for the proportional
// policy and C/3 = 5461.33 for the uniform one. Checks the decisions just
// below and just above each limit, the "does not fit" case for every
// policy, and then 5000 random cases against a real-number model.
module discard_policy_tb;
  import mqm_pkg::*;
  localparam int unsigned AW = 14;
  localparam real         C  = 16384.0;

  discard_mode_e mode;
  logic [1:0]    prio;
  logic [12:0]   nb;
  logic [AW:0]   cnt [3];
  logic [AW:0]   free_cnt;
  logic          fits, accept;
  int            checks = 0, failures = 0;

  discard_policy dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic bit model(discard_mode_e m, int p, int n, int occ, int fr);
    real lim;
    if (n > fr) return 0;
    case (m)
      DISCARD_PROPORTIONAL: lim = C * real'(p + 1) / 6.0;
      DISCARD_UNIFORM:      lim = C / 3.0;
      default:              return 1;
    endcase
    return !(real'(occ) > lim);
  endfunction

  task automatic try(discard_mode_e m, int p, int n, int occ, int fr);
    mode = m; prio = 2'(p); nb = 13'(n); free_cnt = 15'(fr);
    for (int i = 0; i < 3; i++) cnt[i] = (i == p) ? 15'(occ) : 15'($urandom_range(0, 3000));
    #1;
    check($sformatf("mode %0d p %0d nb %0d occ %0d free %0d -> %0d", m, p, n, occ, fr, accept),
          accept == model(m, p, n, occ, fr));
  endtask

  initial begin
    // proportional limits 2730 / 5461 / 8192 blocks
    try(DISCARD_PROPORTIONAL, 0, 1, 2730, 1000); check("p0 at limit kept", accept);
    try(DISCARD_PROPORTIONAL, 0, 1, 2731, 1000); check("p0 over limit dropped", !accept);
    try(DISCARD_PROPORTIONAL, 1, 1, 5461, 1000); check("p1 at limit kept", accept);
    try(DISCARD_PROPORTIONAL, 1, 1, 5462, 1000); check("p1 over limit dropped", !accept);
    try(DISCARD_PROPORTIONAL, 2, 1, 8192, 1000); check("p2 at limit kept", accept);
    try(DISCARD_PROPORTIONAL, 2, 1, 8193, 1000); check("p2 over limit dropped", !accept);
    // uniform limit 5461 for every level
    for (int p = 0; p < 3; p++) begin
      try(DISCARD_UNIFORM, p, 1, 5461, 1000); check("uniform at limit kept", accept);
      try(DISCARD_UNIFORM, p, 1, 5462, 1000); check("uniform over limit dropped", !accept);
    end
    // unconditional: only the fit matters
    try(DISCARD_UNCONDITIONAL, 0, 5, 16000, 5); check("uncond fits", accept);
    try(DISCARD_UNCONDITIONAL, 2, 6, 0, 5);     check("uncond no room", !accept && !fits);
    try(DISCARD_PROPORTIONAL, 2, 6, 0, 5);      check("prop no room", !accept);
    try(DISCARD_UNIFORM, 2, 6, 0, 5);           check("unif no room", !accept);
    for (int n = 0; n < 5000; n++)
      try(discard_mode_e'($urandom_range(0, 2)), $urandom_range(0, 2), $urandom_range(1, 300),
          $urandom_range(0, 10000), $urandom_range(0, 400));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
