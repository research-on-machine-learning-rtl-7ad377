// axis_rr_sched: round-robin distribution of a stream over NUM_CU compute units.
//
// Beat k of the input stream goes to compute unit k mod NUM_CU; results are
// collected from the units in the same turn order, so the output stream keeps
// the input order (AXI-Stream delivers operands in FIFO order). The design
// names a round-robin scheduler that spreads the work over a varying number of
// CORDIC units; collecting in dispatch order is this implementation's choice.
//
// Both sides are plain AXI-Stream: the input pointer advances on an accepted
// input beat, the output pointer on an accepted output beat. No storage, no
// added latency; with pipelined units that accept a beat per cycle the stream
// runs at one beat per cycle. Reset (synchronous, active low) clears both
// pointers.
module axis_rr_sched #(
  parameter int NUM_CU = 1,
  parameter int DATA_W = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // upstream input stream
  input  logic [DATA_W-1:0] s_axis_tdata,
  input  logic              s_axis_tvalid,
  output logic              s_axis_tready,
  input  logic              s_axis_tlast,
  // downstream output stream
  output logic [DATA_W-1:0] m_axis_tdata,
  output logic              m_axis_tvalid,
  input  logic              m_axis_tready,
  output logic              m_axis_tlast,
  // streams to the compute units
  output logic [DATA_W-1:0] cu_s_tdata  [NUM_CU],
  output logic              cu_s_tvalid [NUM_CU],
  input  logic              cu_s_tready [NUM_CU],
  output logic              cu_s_tlast  [NUM_CU],
  // streams from the compute units
  input  logic [DATA_W-1:0] cu_m_tdata  [NUM_CU],
  input  logic              cu_m_tvalid [NUM_CU],
  output logic              cu_m_tready [NUM_CU],
  input  logic              cu_m_tlast  [NUM_CU]
);

  localparam int PW = (NUM_CU > 1) ? $clog2(NUM_CU) : 1;

  logic [PW-1:0] in_ptr, out_ptr;

  function automatic logic [PW-1:0] next(input logic [PW-1:0] p);
    return (32'(p) == NUM_CU - 1) ? '0 : p + 1'b1;
  endfunction

  always_comb begin
    for (int k = 0; k < NUM_CU; k++) begin
      cu_s_tdata[k]  = s_axis_tdata;
      cu_s_tlast[k]  = s_axis_tlast;
      cu_s_tvalid[k] = s_axis_tvalid && (32'(in_ptr) == k);
      cu_m_tready[k] = m_axis_tready && (32'(out_ptr) == k);
    end
    s_axis_tready = cu_s_tready[in_ptr];
    m_axis_tvalid = cu_m_tvalid[out_ptr];
    m_axis_tdata  = cu_m_tdata[out_ptr];
    m_axis_tlast  = cu_m_tlast[out_ptr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_ptr  <= '0;
      out_ptr <= '0;
    end else begin
      if (s_axis_tvalid && s_axis_tready) in_ptr  <= next(in_ptr);
      if (m_axis_tvalid && m_axis_tready) out_ptr <= next(out_ptr);
    end
  end

endmodule
