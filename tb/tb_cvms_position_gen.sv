// tb_cvms_position_gen: self-checking test of the SM position counter and its
// three-register delay line. Random init / count / shift enables and random
// status bits; a queue model of the delay line predicts pos_d and ins_d, and
// a plain counter model (wrapping at N) predicts pos.
// Counter and three delay registers follow the reference data path; the
// status bit carried alongside is this design's own.
module tb_cvms_position_gen;
  localparam int unsigned N = 12;
  localparam int unsigned PW = $clog2(N);

  logic clk = 0, rst_n = 0, init = 0, en_count = 0, en_r = 0, ins = 0;
  logic [PW-1:0] pos, pos_d;
  logic ins_d;
  int checks = 0, failures = 0, wraps = 0;

  cvms_position_gen #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_pos = 0;
  int m_line [3] = '{0, 0, 0};
  int m_ins  [3] = '{0, 0, 0};

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int i = 0; i < 3000; i++) begin
      init     = ($urandom_range(0, 40) == 0);
      en_count = ($urandom_range(0, 2) != 0);
      en_r     = ($urandom_range(0, 3) != 0);
      ins      = 1'($urandom);
      @(posedge clk);
      // model update for this edge
      if (en_r) begin
        m_line[2] = m_line[1]; m_line[1] = m_line[0]; m_line[0] = m_pos;
        m_ins[2]  = m_ins[1];  m_ins[1]  = m_ins[0];  m_ins[0]  = int'(ins);
      end
      if (init) m_pos = 0;
      else if (en_count) begin
        if (m_pos == N - 1) wraps++;
        m_pos = (m_pos + 1) % N;
      end
      #1;
      checks++;
      if (pos != PW'(m_pos) || pos_d != PW'(m_line[2]) || ins_d != 1'(m_ins[2])) begin
        failures++;
        if (failures < 10)
          $display("FAIL pos=%0d/%0d pos_d=%0d/%0d ins_d=%0d/%0d", pos, m_pos, pos_d, m_line[2], ins_d, m_ins[2]);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL counter never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
