// tb_aau: randomized check of one Adaptive Arithmetic Unit.
//
// Every cycle the controls (data-register source, coefficient load, DATA2
// load, square mode, adder input select, accumulator enable, shift) and all
// data inputs are drawn at random. A model kept here from the unit's
// definition predicts the combinational chain sum before the clock edge and
// the registers and the shifted store word after it; all are compared.
module tb_aau;
  import vxc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  dsel_e dsel;
  logic cload, d2load, msq, acc_en;
  asel_e asel;
  logic signed [15:0] lram_rdata, cram_rdata, rom_rdata, chain_data_in, chain_acc_in;
  logic signed [31:0] sum_in;
  logic [4:0] shamt;
  logic signed [15:0] data_q, coef_q, acc_st;
  logic signed [31:0] sum_out, acc_q;

  int checks = 0, failures = 0;

  aau dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic signed [15:0] m_d, m_c, m_d2;
  logic signed [31:0] m_acc, m_sum, m_add, m_sh;

  initial begin
    dsel = D_HOLD; cload = 0; d2load = 0; msq = 0; acc_en = 0; asel = A_ZERO;
    lram_rdata = 0; cram_rdata = 0; rom_rdata = 0; chain_data_in = 0; chain_acc_in = 0;
    sum_in = 0; shamt = 0;
    m_d = 0; m_c = 0; m_d2 = 0; m_acc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      dsel   = dsel_e'($urandom_range(4));
      cload  = 1'($urandom);
      d2load = 1'($urandom);
      msq    = 1'($urandom);
      acc_en = ($urandom_range(3) != 0);
      asel   = asel_e'($urandom_range(2));
      lram_rdata = 16'($urandom); cram_rdata = 16'($urandom); rom_rdata = 16'($urandom);
      chain_data_in = 16'($urandom); chain_acc_in = 16'($urandom);
      sum_in = 32'($urandom);
      shamt  = 5'($urandom_range(16));
      #1;
      m_add = (asel == A_ZERO) ? 32'sd0 : (asel == A_CHAIN) ? sum_in : (32'(m_d2) <<< shamt);
      m_sum = 32'(m_d) * 32'(msq ? m_d : m_c) + m_add;
      check(sum_out == m_sum, $sformatf("sum_out %0d exp %0d", sum_out, m_sum));
      m_sh = m_acc >>> shamt;
      check(acc_st == m_sh[15:0], $sformatf("acc_st %0d exp %0d", acc_st, m_sh[15:0]));
      @(posedge clk);
      if (d2load) m_d2 = m_d;
      case (dsel)
        D_LOCAL: m_d = lram_rdata;
        D_ROM:   m_d = rom_rdata;
        D_CHAIN: m_d = chain_data_in;
        D_ACCCH: m_d = chain_acc_in;
        default: ;
      endcase
      if (cload) m_c = cram_rdata;
      if (acc_en) m_acc = m_sum;
      #1;
      check(data_q == m_d && coef_q == m_c, $sformatf("regs d=%0d c=%0d exp %0d %0d", data_q, coef_q, m_d, m_c));
      check(acc_q == m_acc, $sformatf("acc %0d exp %0d", acc_q, m_acc));
    end
    // a filter tap chain in miniature: 3 x 4 + 5 with DATA2 at shift 0
    @(negedge clk);
    dsel = D_LOCAL; lram_rdata = 16'sd3; cload = 1; cram_rdata = 16'sd4; d2load = 0; acc_en = 0;
    @(negedge clk);
    dsel = D_HOLD; cload = 0; msq = 0; asel = A_CHAIN; sum_in = 32'sd5; acc_en = 1; shamt = 0;
    #1 check(sum_out == 32'sd17, "3*4+5");
    @(negedge clk);
    #1 check(acc_q == 32'sd17 && acc_st == 16'sd17, "accumulator holds 17");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
