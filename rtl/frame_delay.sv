// frame_delay: delays a data word and its valid flag by DEPTH clock cycles.
//
// The Parseval check of a frame is only known after the frame's last FFT output. The
// FFT outputs are therefore held back by one frame (DEPTH = N cycles), so that each
// sample reaches the correction stage together with its frame's check results. The line
// is a plain shift register that advances every cycle.
//
// Interface: clk, rst (synchronous, active high; clears the valid flags), in_valid,
// in_data (W bits) -> out_valid, out_data, both DEPTH cycles later.
// The need to align outputs with the check result comes from the published scheme. The
// published design does not describe how it is done. The shift register is this
// design's choice.
module frame_delay #(
  parameter int unsigned W     = 180,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);

  logic [W-1:0] data_q  [DEPTH];
  logic [DEPTH-1:0] valid_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_q <= '0;
      for (int i = 0; i < int'(DEPTH); i++) data_q[i] <= '0;
    end else begin
      valid_q[0] <= in_valid;
      data_q[0]  <= in_data;
      for (int i = 1; i < int'(DEPTH); i++) begin
        valid_q[i] <= valid_q[i-1];
        data_q[i]  <= data_q[i-1];
      end
    end
  end

  assign out_valid = valid_q[DEPTH-1];
  assign out_data  = data_q[DEPTH-1];

endmodule
