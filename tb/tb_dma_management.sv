// tb_dma_management: four streams are written at 160 MHz with random gaps
// and read at 100 MHz with random stalls; every channel must deliver its own
// words, with tlast, in order and without loss, and must push back (tready
// low) when the reader stops long enough to fill the FIFO.
module tb_dma_management;
  localparam int N = 4, AW = 5, WORDS = 300;
  logic clk_160 = 0, clk_100 = 0, rst160_n = 0, rst100_n = 0;
  logic [31:0] s_tdata [N], m_tdata [N];
  logic [N-1:0] s_tvalid = '0, s_tlast = '0, s_tready, m_tvalid, m_tlast, m_tready = '0;
  int checks = 0, failures = 0;
  int sent [N], recv [N], backpressure [N];
  bit reader_on = 1;

  dma_management #(.N_CH(N), .FIFO_AW(AW)) dut (
    .clk_160, .rst160_n, .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tlast(s_tlast), .s_axis_tready(s_tready),
    .clk_100, .rst100_n, .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tlast(m_tlast), .m_axis_tready(m_tready));

  always #3.125 clk_160 = ~clk_160;
  always #5     clk_100 = ~clk_100;

  function automatic logic [31:0] word(input int ch, input int k);
    return {4'(ch), 28'(k * 2654435761)};
  endfunction

  for (genvar i = 0; i < N; i++) begin : g
    always @(posedge clk_160) if (rst160_n) begin
      if (s_tvalid[i] && s_tready[i]) sent[i]++;
      if (s_tvalid[i] && !s_tready[i]) backpressure[i]++;
    end
    always @(negedge clk_160) if (rst160_n) begin
      if (!(s_tvalid[i] && !s_tready[i])) begin   // hold a word until taken
        s_tvalid[i] <= (sent[i] + (s_tvalid[i] && s_tready[i] ? 1 : 0) < WORDS) && ($urandom % 4 != 0);
      end
    end
    assign s_tdata[i] = word(i, sent[i]);
    assign s_tlast[i] = (sent[i] % 25 == 24);
    always @(negedge clk_100) m_tready[i] <= reader_on && ($urandom % 3 != 0);
    always @(posedge clk_100) if (rst100_n && m_tvalid[i] && m_tready[i]) begin
      checks++;
      if (m_tdata[i] !== word(i, recv[i]) || m_tlast[i] !== (recv[i] % 25 == 24)) begin
        failures++; $display("FAIL: ch%0d word %0d got %h expected %h", i, recv[i], m_tdata[i], word(i, recv[i]));
      end
      recv[i]++;
    end
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50 rst160_n = 1; rst100_n = 1;
    // Reader stopped for a while: the FIFOs fill and push back.
    reader_on = 0;
    #2000;
    reader_on = 1;
    wait (recv[0] == WORDS && recv[1] == WORDS && recv[2] == WORDS && recv[3] == WORDS);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (sent[i] != WORDS || backpressure[i] == 0) begin
        failures++; $display("FAIL: ch%0d sent %0d, back-pressure cycles %0d", i, sent[i], backpressure[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
