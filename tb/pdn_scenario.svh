// Shared body of the end-to-end testbenches of pdn_testbed_top. The including
// module defines the localparams NS (sensors, a GRID x GRID square), GRID,
// NW (wasters), KB (RSA key bits), NV, LD, MAXS, NSAMP (samples taken) and
// ATTACK_US (how long the attack lasts), then includes this file.
//
// The testbench plays the roles the RTL cannot: the host of each tenant, and
// the physics of the shared supply. Its supply model: while the wasters are
// active, each sensor sees a resistive droop that shrinks with its grid
// distance from the attacker (sensor 0's corner), plus a die-wide inductive
// dip between 10 and 20 us after switch-on. Delay faults are emulated: while
// the supply at the adder (two grid steps from the attacker) is below ADDER_FAIL_MV, a corrupted
// capture is substituted every 64 clocks; and once, while the RSA core works
// on Yp under attack, one bit of the Montgomery partial sum is flipped.
//
// Mechanisms that must each happen at least once: clean RSA operation,
// attack switch-on (wasters toggling), supply droop seen by every sensor,
// attack located at the sensor nearest the attacker, adder delay faults
// logged after time zero, faulty RSA result that yields a prime factor.

import pdn_pkg::*;
import rsa_ref_pkg::*;

localparam int unsigned ADDER_FAIL_MV = 1000;

logic clk = 1'b0, rst_n = 1'b0;
always #10 clk = ~clk;   // 50 MHz

logic        attack_enable = 1'b0, attack_active;
logic        rsa_we = 0, rsa_re = 0, dft_we = 0, dft_re = 0, mon_we = 0, mon_re = 0;
hb_addr_t    rsa_addr = '0, dft_addr = '0, mon_addr = '0;
hb_data_t    rsa_wdata = '0, dft_wdata = '0, mon_wdata = '0;
hb_data_t    rsa_rdata, dft_rdata, mon_rdata;
logic        rsa_rvalid, dft_rvalid, mon_rvalid, dft_fault;
logic [15:0] sensor_vdd_mv [NS];

int checks = 0, failures = 0;
task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin failures++; $display("FAIL: %s", what); end
endtask

// ------------------------------------------------------------ supply model
realtime t_on = 0;
int      v_adder_mv = 1100;
always @(posedge attack_active) t_on = $realtime;

localparam real ADDER_DIST = 2.0;   // adder's distance from the attacker, grid units

function automatic int droop_mv(input int s, input realtime t);
  return droop_at($sqrt(real'((s % GRID) ** 2 + (s / GRID) ** 2)), t);
endfunction

function automatic int droop_at(input real d, input realtime t);
  real dt_us, dip;
  dt_us = (t - t_on) / 1us;
  dip   = (dt_us >= 10.0 && dt_us <= 20.0) ? 60.0 : 0.0;
  return int'(200.0 / (1.0 + 0.8 * d) + dip);
endfunction

always @(posedge clk) begin
  for (int s = 0; s < int'(NS); s++)
    sensor_vdd_mv[s] <= attack_active ? 16'(1100 - droop_mv(s, $realtime)) : 16'd1100;
  v_adder_mv <= attack_active ? 1100 - droop_at(ADDER_DIST, $realtime) : 1100;
end

// ----------------------------------------------------------- host buses
task automatic bus_write(input int which, input hb_addr_t a, input hb_data_t d);
  @(negedge clk);
  case (which)
    0: begin rsa_we = 1; rsa_addr = a; rsa_wdata = d; end
    1: begin dft_we = 1; dft_addr = a; dft_wdata = d; end
    default: begin mon_we = 1; mon_addr = a; mon_wdata = d; end
  endcase
  @(negedge clk);
  rsa_we = 0; dft_we = 0; mon_we = 0;
endtask

task automatic bus_read(input int which, input hb_addr_t a, output hb_data_t d);
  @(negedge clk);
  case (which)
    0: begin rsa_re = 1; rsa_addr = a; end
    1: begin dft_re = 1; dft_addr = a; end
    default: begin mon_re = 1; mon_addr = a; end
  endcase
  @(negedge clk);
  rsa_re = 0; dft_re = 0; mon_re = 0;
  case (which)
    0: d = rsa_rdata;
    1: d = dft_rdata;
    default: d = mon_rdata;
  endcase
endtask

localparam int unsigned KW = KB / 32;

task automatic rsa_load(input big_t p, input big_t q, input big_t d, input big_t x);
  for (int w = 0; w < int'(KW); w++) begin
    bus_write(0, hb_addr(RSA_REG_P, w), p[w*32 +: 32]);
    bus_write(0, hb_addr(RSA_REG_Q, w), q[w*32 +: 32]);
  end
  for (int w = 0; w < int'(2 * KW); w++) begin
    bus_write(0, hb_addr(RSA_REG_D, w), d[w*32 +: 32]);
    bus_write(0, hb_addr(RSA_REG_X, w), x[w*32 +: 32]);
  end
endtask

task automatic rsa_wait_read(output big_t yp, output big_t yq, output int cycles);
  hb_data_t r;
  do bus_read(0, hb_addr(RSA_REG_CTRL, 0), r); while (!r[0]);
  bus_read(0, hb_addr(RSA_REG_CTRL, 1), r);
  cycles = int'(r);
  yp = '0; yq = '0;
  for (int w = 0; w < int'(KW); w++) begin
    bus_read(0, hb_addr(RSA_REG_YP, w), r); yp[w*32 +: 32] = r;
    bus_read(0, hb_addr(RSA_REG_YQ, w), r); yq[w*32 +: 32] = r;
  end
endtask

// ------------------------------------------------------ fault emulation
int  n_adder_inj = 0, n_rsa_inj = 0;
logic [KB+1:0] s_snap;
logic [ADDER_WIDTH:0] sum_snap;
always @(negedge clk) begin
  if (attack_active && v_adder_mv < int'(ADDER_FAIL_MV) && ($time / 20) % 64 == 0) begin
    sum_snap = dut.u_adder.sum;
    force dut.u_adder.sum = sum_snap ^ (ADDER_WIDTH+1)'(1 << 40);
    n_adder_inj++;
    @(posedge clk);
    #1 release dut.u_adder.sum;
  end
end
always @(negedge clk) begin
  if (attack_active && n_rsa_inj == 0 && dut.u_rsa.busy && !dut.u_rsa.sel_q &&
      dut.u_rsa.u_exp.u_mm.busy && ($realtime - t_on) > 12us) begin
    s_snap = dut.u_rsa.u_exp.u_mm.s;
    force dut.u_rsa.u_exp.u_mm.s = s_snap ^ (KB+2)'(1 << 5);
    n_rsa_inj++;
    @(posedge clk);
    #1 release dut.u_rsa.u_exp.u_mm.s;
  end
end

// ------------------------------------------------------------- scenario
big_t pb, qb, nb, eb, db, xb, yp, yq, yb, f;
int   cyc, base_cnt[NS], atk_cnt[NS], min_s, n_clean = 0, n_droop = 0, n_located = 0,
      n_adder_logged = 0, n_key = 0, toggles0;
hb_data_t r, r2;
logic [63:0] va, vb;

initial begin
  for (int s = 0; s < int'(NS); s++) sensor_vdd_mv[s] = 16'd1100;
  repeat (3) @(negedge clk);
  rst_n = 1'b1;

  // Keys: two primes just below 2^KB.
  if (KB == 32)       begin pb = 32'hFFFF_FFFB; qb = 32'hFFFF_FFEF; end
  else if (KB == 64)  begin pb = 64'hFFFF_FFFF_FFFF_FFC5; qb = 64'h7FFF_FFFF_FFFF_FFE7; end
  else                begin pb = (big_t'(1) << 128) - 159; qb = (big_t'(1) << 127) - 1; end
  nb = pb * qb;
  eb = 65537;
  db = modinv(eb, (pb - 1) * (qb - 1));
  check(mulmod(eb, db, (pb - 1) * (qb - 1)) == 1, "reference key");

  // 1. Clean RSA operation.
  xb = ((big_t'({$urandom, $urandom, $urandom, $urandom}) << 128) |
         big_t'({$urandom, $urandom, $urandom, $urandom})) % nb;
  rsa_load(pb, qb, db, xb);
  bus_write(0, hb_addr(RSA_REG_CTRL, 0), 1);
  rsa_wait_read(yp, yq, cyc);
  yb = crt_combine(yp, yq, pb, qb);
  check(yb == powmod(xb, db, nb), "clean RSA result");
  check(yp == powmod(xb, db, pb) && yq == powmod(xb, db, qb), "clean Yp and Yq");
  if (yb == powmod(xb, db, nb)) n_clean++;
  $display("RSA %0d-bit operation: %0d cycles", KB, cyc);
  check_rsa_cycles(cyc);

  // 2. Adder vectors: operand pairs that sensitise long carry chains.
  for (int v = 0; v < int'(NV); v++) begin
    logic [ADDER_WIDTH:0] e;
    va = '0; vb = '0;
    va = {$urandom, $urandom};
    vb = (v % 2) ? ~va + 64'(1) : {$urandom, $urandom};
    e  = {1'b0, va[63:0]} + {1'b0, vb[63:0]};
    for (int k = 0; k < 2; k++) begin
      bus_write(1, hb_addr(DFT_REG_VEC, v * 16 + k), va[k*32 +: 32]);
      bus_write(1, hb_addr(DFT_REG_VEC, v * 16 + 4 + k), vb[k*32 +: 32]);
    end
    for (int k = 0; k < 3; k++) bus_write(1, hb_addr(DFT_REG_VEC, v * 16 + 8 + k), 32'(e >> (32 * k)));
  end
  bus_write(1, hb_addr(DFT_REG_CTRL, 0), 3);

  // 3. Monitor run; attack and second RSA operation start after 3 samples.
  bus_write(2, hb_addr(MON_REG_CTRL, 0), NSAMP);
  xb = (xb * 7 + 12345) % nb;
  rsa_load(pb, qb, db, xb);
  do bus_read(2, hb_addr(MON_REG_CTRL, 1), r); while (r < 3);
  @(negedge clk) attack_enable = 1'b1;
  bus_write(0, hb_addr(RSA_REG_CTRL, 0), 1);
  #(ATTACK_US * 1us);
  toggles0 = int'(dut.u_attacker.g_waster[0].u_pw.toggles);
  check(toggles0 > 1000, $sformatf("wasters toggling (%0d toggles)", toggles0));
  @(negedge clk) attack_enable = 1'b0;
  rsa_wait_read(yp, yq, cyc);
  do bus_read(2, hb_addr(MON_REG_CTRL, 0), r); while (!r[0]);

  // 4. Monitor log: baseline = sample 1, attack = lowest count per sensor.
  for (int s = 0; s < int'(NS); s++) begin
    bus_read(2, hb_addr(MON_REG_LOG, 1 * NS + s), r);
    base_cnt[s] = int'(r);
    atk_cnt[s]  = 1 << 30;
    for (int w = 3; w < int'(NSAMP); w++) begin
      bus_read(2, hb_addr(MON_REG_LOG, w * NS + s), r);
      if (int'(r) < atk_cnt[s]) atk_cnt[s] = int'(r);
    end
    check(base_cnt[s] > 1000 && base_cnt[s] < 1100, $sformatf("sensor %0d baseline %0d", s, base_cnt[s]));
    if (atk_cnt[s] < base_cnt[s] * 99 / 100) n_droop++;
  end
  check(n_droop == int'(NS), $sformatf("droop seen by %0d of %0d sensors", n_droop, NS));
  min_s = 0;
  for (int s = 1; s < int'(NS); s++) if (atk_cnt[s] < atk_cnt[min_s]) min_s = s;
  if (min_s == 0) n_located++;
  check(min_s == 0, $sformatf("attack located at sensor %0d", min_s));
  check(atk_cnt[NS-1] > atk_cnt[0], "droop shrinks with distance");

  // 5. Adder delay faults.
  bus_write(1, hb_addr(DFT_REG_CTRL, 0), 0);
  bus_read(1, hb_addr(DFT_REG_CTRL, 1), r);
  bus_read(1, hb_addr(DFT_REG_CTRL, 2), r2);
  check(int'(r) >= n_adder_inj && n_adder_inj > 0, $sformatf("%0d adder faults for %0d injections", r, n_adder_inj));
  n_adder_logged = int'(r2);
  for (int i = 0; i < int'(r2) && i < 4; i++) begin
    hb_data_t ts;
    bus_read(1, hb_addr(DFT_REG_LOG, i * 8), ts);
    check(int'(ts) >= 10 * 50 && int'(ts) <= 20 * 50 + 10,
          $sformatf("fault timestamp %0d inside the 10-20 us dip", ts));
  end

  // 6. Faulty RSA result and key recovery.
  check(n_rsa_inj == 1, "one RSA fault injected");
  yb = crt_combine(yp, yq, pb, qb);
  f  = lenstra_factor(xb, yb, eb, nb);
  check(f == qb, "faulty signature reveals q");
  if (f == qb) begin
    big_t d2;
    d2 = modinv(eb, (f - 1) * (nb / f - 1));
    if (powmod(powmod(xb, eb, nb), d2, nb) == xb) n_key++;
  end

  $display("mechanisms: clean_rsa=%0d attack_on=%0d droop=%0d located=%0d adder_faults=%0d key_recovered=%0d",
           n_clean, toggles0 > 0, n_droop, n_located, n_adder_logged, n_key);
  check(n_clean > 0,        "mechanism: clean RSA operation");
  check(toggles0 > 0,       "mechanism: attack switch-on");
  check(n_droop > 0,        "mechanism: supply droop");
  check(n_located > 0,      "mechanism: attack located");
  check(n_adder_logged > 0, "mechanism: adder delay fault logged");
  check(n_key > 0,          "mechanism: private key recovered");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
