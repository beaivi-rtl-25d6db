// Result pipeline shared by the multi-cycle function units.
//
// A value captured on "in_valid" appears on "out" exactly LAT cycles later
// and then stays there until a later value arrives; a new value may enter
// every cycle, so the unit is fully pipelined. LAT = 1 is a single result
// register.
module beaivi_fu_pipe #(
  parameter int unsigned LAT = 2,
  parameter int unsigned W   = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in,
  output logic [W-1:0] out
);
  logic [LAT-1:0]        v_q;
  logic [LAT-1:0][W-1:0] d_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
      d_q <= '0;
    end else begin
      v_q[0] <= in_valid;
      if (in_valid) d_q[0] <= in;
      for (int i = 1; i < LAT; i++) begin
        v_q[i] <= v_q[i-1];
        if (i == LAT - 1) begin
          if (v_q[i-1]) d_q[i] <= d_q[i-1];
        end else begin
          d_q[i] <= d_q[i-1];
        end
      end
    end
  end

  assign out = d_q[LAT-1];
endmodule
