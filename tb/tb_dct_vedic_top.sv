// tb_dct_vedic_top: end-to-end test of the top level at its default
// parameters (8-bit samples, 32-bit multiplier).
//
// Streams operations into all three datapaths at once, one per clock, with
// random idle cycles, and checks every result one clock after it was issued
// against the references of dct_ref_pkg and a 64-bit product. It counts
// each mechanism the design has and fails if one never happened:
// 16-point and 2x8-point modes of the 16/8 engine, the 32-, 16- and 8-point
// modes of the 32/16/8 engine, mode switches on consecutive clocks in both
// engines, 64-point transforms, multiplications, idle cycles, and the reset
// of the valid flags. The 64-point reference applies the recursion
// (F(2k) from the sums, F(2k+1) from the differences) to ref32.
module tb_dct_vedic_top;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int DATA_W = 8;
  localparam int NOPS   = 400;

  logic                     clk = 1'b0;
  logic                     rst_n;
  logic                     d16_valid_i, d16_sel16_i, d16_valid_o;
  logic signed [DATA_W-1:0] d16_x_i [16];
  logic signed [DATA_W+3:0] d16_f_o [16];
  logic                     d32_valid_i, d32_valid_o;
  dct_size_e                d32_size_i;
  logic signed [DATA_W-1:0] d32_x_i [32];
  logic signed [DATA_W+4:0] d32_f_o [32];
  logic                     dn_valid_i, dn_valid_o;
  logic signed [DATA_W-1:0] dn_x_i [64];
  logic signed [DATA_W+5:0] dn_f_o [64];
  logic                     mul_valid_i, mul_valid_o;
  logic [31:0]              mul_a_i, mul_b_i;
  logic [63:0]              mul_p_o;

  int checks = 0, failures = 0;
  int cyc = 0;
  // mechanism counters
  int n_d16_16 = 0, n_d16_8 = 0, n_d16_switch = 0;
  int n_d32 [3] = '{0, 0, 0};
  int n_d32_switch = 0, n_dn = 0, n_mul = 0, n_idle = 0, n_reset = 0;

  dct_vedic_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin : watchdog
    wait (cyc == 20 * NOPS);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  // expected results of the operation issued on the previous clock
  int  e16 [16], e32 [32], e64 [64];
  logic [63:0] emul;
  logic pend16 = 1'b0, pend32 = 1'b0, pendn = 1'b0, pendm = 1'b0;

  initial begin
    int v16[16], v32[32], v64[64], a64[32], b64[32], fa64[32], fb64[32], h8[8], g8[8], h16[16], g16[16], t16[16];
    int m, prev_m = -1, prev_sel = -1;
    logic [31:0] ra, rb;
    rst_n = 1'b0;
    d16_valid_i = 1'b0; d32_valid_i = 1'b0; dn_valid_i = 1'b0; mul_valid_i = 1'b0;
    for (int j = 0; j < 64; j++) dn_x_i[j] = '0;
    d16_sel16_i = 1'b0; d32_size_i = DCT_8; mul_a_i = '0; mul_b_i = '0;
    for (int j = 0; j < 16; j++) d16_x_i[j] = '0;
    for (int j = 0; j < 32; j++) d32_x_i[j] = '0;
    repeat (3) @(posedge clk);
    #1;
    chk(!d16_valid_o && !d32_valid_o && !dn_valid_o && !mul_valid_o, "valid flags cleared by reset");
    n_reset++;
    rst_n = 1'b1;
    for (int op = 0; op < NOPS; op++) begin
      // drive one operation (or an idle cycle) just after a clock edge
      if (op > 4 && $urandom % 8 == 0) begin
        d16_valid_i = 1'b0; d32_valid_i = 1'b0; dn_valid_i = 1'b0; mul_valid_i = 1'b0;
        n_idle++;
      end else begin
        // 16/8 engine
        d16_valid_i = 1'b1;
        d16_sel16_i = (op < 2) ? 1'(op) : 1'($urandom);
        for (int j = 0; j < 16; j++) begin
          v16[j] = rnd_sample(DATA_W);
          d16_x_i[j] = DATA_W'(v16[j]);
        end
        if (d16_sel16_i) begin
          ref16(v16, e16);
          n_d16_16++;
        end else begin
          for (int h = 0; h < 2; h++) begin
            for (int j = 0; j < 8; j++) h8[j] = v16[8*h+j];
            ref8(h8, g8);
            for (int j = 0; j < 8; j++) e16[8*h+j] = g8[j];
          end
          n_d16_8++;
        end
        if (prev_sel >= 0 && prev_sel != int'(d16_sel16_i)) n_d16_switch++;
        prev_sel = int'(d16_sel16_i);
        // 32/16/8 engine
        m = (op < 3) ? op : int'($urandom % 3);
        d32_valid_i = 1'b1;
        d32_size_i = (m == 0) ? DCT_8 : (m == 1) ? DCT_16 : DCT_32;
        for (int j = 0; j < 32; j++) begin
          v32[j] = rnd_sample(DATA_W);
          d32_x_i[j] = DATA_W'(v32[j]);
        end
        if (m == 2) ref32(v32, e32);
        else if (m == 1) begin
          for (int h = 0; h < 2; h++) begin
            for (int j = 0; j < 16; j++) h16[j] = v32[16*h+j];
            ref16(h16, t16);
            for (int j = 0; j < 16; j++) e32[16*h+j] = t16[j];
          end
        end else begin
          for (int h = 0; h < 4; h++) begin
            for (int j = 0; j < 8; j++) h8[j] = v32[8*h+j];
            ref8(h8, g8);
            for (int j = 0; j < 8; j++) e32[8*h+j] = g8[j];
          end
        end
        n_d32[m]++;
        if (prev_m >= 0 && prev_m != m) n_d32_switch++;
        prev_m = m;
        // fixed 64-point engine
        dn_valid_i = 1'b1;
        for (int j = 0; j < 64; j++) begin
          v64[j] = rnd_sample(DATA_W);
          dn_x_i[j] = DATA_W'(v64[j]);
        end
        for (int i = 0; i < 32; i++) begin
          a64[i] = v64[i] + v64[63-i];
          b64[i] = v64[i] - v64[63-i];
        end
        ref32(a64, fa64);
        ref32(b64, fb64);
        for (int k = 0; k < 32; k++) begin
          e64[2*k]   = fa64[k];
          e64[2*k+1] = fb64[k];
        end
        n_dn++;
        // multiplier
        ra = (op == 0) ? 32'h3800_0000 : $urandom;
        rb = (op == 0) ? 32'h338F_FFFF : $urandom;
        mul_valid_i = 1'b1;
        mul_a_i = ra;
        mul_b_i = rb;
        emul = 64'(ra) * 64'(rb);
        n_mul++;
      end
      pend16 = d16_valid_i;
      pend32 = d32_valid_i;
      pendn  = dn_valid_i;
      pendm  = mul_valid_i;
      @(posedge clk);
      #1;
      // one clock later: results registered
      chk(d16_valid_o == pend16, "d16 valid latency");
      chk(d32_valid_o == pend32, "d32 valid latency");
      chk(dn_valid_o == pendn, "dn valid latency");
      chk(mul_valid_o == pendm, "mul valid latency");
      if (pend16) for (int k = 0; k < 16; k++) chk(int'(d16_f_o[k]) == e16[k], $sformatf("d16 f[%0d]", k));
      if (pend32) for (int k = 0; k < 32; k++) chk(int'(d32_f_o[k]) == e32[k], $sformatf("d32 f[%0d]", k));
      if (pendn) for (int k = 0; k < 64; k++) chk(int'(dn_f_o[k]) == e64[k], $sformatf("dn f[%0d]", k));
      if (pendm) chk(mul_p_o == emul, "product");
    end
    $display("mechanisms: d16 16-point %0d, d16 2x8-point %0d, d16 mode switches %0d",
             n_d16_16, n_d16_8, n_d16_switch);
    $display("mechanisms: d32 8-point %0d, 16-point %0d, 32-point %0d, size switches %0d",
             n_d32[0], n_d32[1], n_d32[2], n_d32_switch);
    $display("mechanisms: 64-point transforms %0d", n_dn);
    $display("mechanisms: multiplications %0d, idle cycles %0d, resets %0d", n_mul, n_idle, n_reset);
    chk(n_d16_16 > 0, "16-point mode never used");
    chk(n_d16_8 > 0, "2x8-point mode never used");
    chk(n_d16_switch > 0, "16/8 engine never switched mode");
    chk(n_d32[0] > 0 && n_d32[1] > 0 && n_d32[2] > 0, "a 32/16/8 size never used");
    chk(n_d32_switch > 0, "32/16/8 engine never switched size");
    chk(n_dn > 0, "64-point engine never used");
    chk(n_mul > 0, "multiplier never used");
    chk(n_idle > 0, "no idle cycle");
    chk(n_reset > 0, "reset never checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_dct_vedic_top
