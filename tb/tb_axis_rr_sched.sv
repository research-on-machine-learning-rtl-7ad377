// tb_axis_rr_sched: three behavioural compute units, each a FIFO with its own
// random input readiness and random result delay that marks every beat with
// its unit number. Checks that beat k goes to unit k mod 3, that the output
// stream returns the beats in input order with tlast intact, under random
// valid gaps and output back-pressure, and that all units were used.
module tb_axis_rr_sched;
  localparam int NCU = 3, N = 600;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [63:0] s_tdata, m_tdata;
  logic s_tvalid, s_tready, s_tlast, m_tvalid, m_tready, m_tlast;
  logic [63:0] cu_s_tdata [NCU], cu_m_tdata [NCU];
  logic cu_s_tvalid [NCU], cu_s_tready [NCU], cu_s_tlast [NCU];
  logic cu_m_tvalid [NCU], cu_m_tready [NCU], cu_m_tlast [NCU];

  axis_rr_sched #(.NUM_CU(NCU)) dut (.clk, .rst_n,
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready), .s_axis_tlast(s_tlast),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready), .m_axis_tlast(m_tlast),
    .cu_s_tdata, .cu_s_tvalid, .cu_s_tready, .cu_s_tlast,
    .cu_m_tdata, .cu_m_tvalid, .cu_m_tready, .cu_m_tlast);

  // behavioural units: queue of {last, data ^ tag}
  logic [64:0] q [NCU][$];
  int used [NCU];
  for (genvar k = 0; k < NCU; k++) begin : g_cu
    always_ff @(posedge clk) begin
      if (cu_s_tvalid[k] && cu_s_tready[k]) begin
        q[k].push_back({cu_s_tlast[k], cu_s_tdata[k] ^ (64'(k + 1) << 56)});
        used[k]++;
      end
      if (cu_m_tvalid[k] && cu_m_tready[k]) void'(q[k].pop_front());
      cu_s_tready[k] <= ($urandom_range(0, 3) != 0);
      cu_m_tvalid[k] <= (q[k].size() > 1) || (q[k].size() == 1 && !(cu_m_tvalid[k] && cu_m_tready[k]) && ($urandom_range(0, 1) != 0));
    end
    assign cu_m_tdata[k] = (q[k].size() > 0) ? q[k][0][63:0] : '0;
    assign cu_m_tlast[k] = (q[k].size() > 0) ? q[k][0][64] : 1'b0;
  end

  initial begin
    int iin, iout;
    bit in_fire, out_fire;
    for (int k = 0; k < NCU; k++) used[k] = 0;
    s_tvalid = 0; m_tready = 0; s_tdata = 0; s_tlast = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    iin = 0; iout = 0;
    while (iout < N) begin
      s_tvalid = (iin < N) && ($urandom_range(0, 3) != 0);
      s_tdata  = 64'(iin) * 64'h1_0001;
      s_tlast  = (iin % 7) == 6;
      m_tready = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      in_fire  = s_tvalid && s_tready;
      out_fire = m_tvalid && m_tready;
      if (in_fire) begin
        checks++;
        if (!cu_s_tvalid[iin % NCU]) failures++;     // beat goes to unit iin mod NCU
      end
      if (out_fire) begin
        checks++;
        if (m_tdata != ((64'(iout) * 64'h1_0001) ^ ({32'd0, 32'((iout % NCU) + 1)} << 56)) || m_tlast != ((iout % 7) == 6)) begin
          failures++;
          if (failures < 10) $display("out %0d: got %h", iout, m_tdata);
        end
        iout++;
      end
      @(posedge clk); #1;
      if (in_fire) iin++;
    end
    for (int k = 0; k < NCU; k++) begin
      checks++;
      if (used[k] != N / NCU) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
