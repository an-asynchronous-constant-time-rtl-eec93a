// buffer_pipeline: the pipeline whose occupancy is being tracked.
//
// STAGES one-token buffers in a row. A stage takes a new token when it is
// empty or when its own token leaves in the same cycle, so a full pipeline
// still moves one token per cycle. Each stage holds at most one token, so
// at most STAGES tokens are inside.
//
// Interface: in_* and out_* are valid/ready token channels with DATA_W-bit
// data. occupancy counts the full stages (for checking only; the detector
// itself never looks at it).
// Timing: a token needs STAGES cycles from in to out when nothing stalls.
//
// Follows the document: a bare pipeline of 25 buffers. Own choices: the
// buffer style (a register with a ready that looks one stage ahead) and the
// data width.
module buffer_pipeline #(
  parameter int unsigned STAGES = 25,
  parameter int unsigned DATA_W = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [DATA_W-1:0]         in_data,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic [DATA_W-1:0]         out_data,
  output logic [$clog2(STAGES+1)-1:0] occupancy
);

  logic              full_q [STAGES];
  logic [DATA_W-1:0] data_q [STAGES];
  logic              rdy    [STAGES+1];

  assign rdy[STAGES] = out_ready;
  assign in_ready    = rdy[0];
  assign out_valid   = full_q[STAGES-1];
  assign out_data    = data_q[STAGES-1];

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    logic             vin;
    logic [DATA_W-1:0] din;
    if (s == 0) begin : g_first
      assign vin = in_valid;
      assign din = in_data;
    end else begin : g_next
      assign vin = full_q[s-1];
      assign din = data_q[s-1];
    end

    assign rdy[s] = !full_q[s] || rdy[s+1];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        full_q[s] <= 1'b0;
        data_q[s] <= '0;
      end else if (rdy[s]) begin
        full_q[s] <= vin;
        if (vin)
          data_q[s] <= din;
      end
    end
  end

  always_comb begin
    occupancy = '0;
    for (int s = 0; s < STAGES; s++)
      occupancy += $bits(occupancy)'(full_q[s]);
  end

endmodule
