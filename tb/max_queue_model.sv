// max_queue_model: behavioural stand-in for the max queue, used only to test
// the control unit on its own. Same ports as rocket_queue. Items live in a
// plain array; an insert or remove takes effect at the clock edge and
// top_item (largest value, lowest index on ties) follows in the next cycle,
// as with the real queue. item_count is exact at once.
module max_queue_model #(
  parameter int ID_W = 6,
  parameter int VAL_W = 6,
  parameter int SLOTS = 64,
  localparam int IW = ID_W + VAL_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          add_item,
  input  logic [IW-1:0] item_in,
  output logic [IW-1:0] top_item,
  output logic [7:0]    item_count
);
  logic [IW-1:0] slot [SLOTS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < SLOTS; i++) slot[i] <= '0;
    end else if (item_in[IW-1 -: ID_W] != '0) begin
      if (add_item) begin
        for (int i = 0; i < SLOTS; i++)
          if (slot[i][IW-1 -: ID_W] == '0) begin
            slot[i] <= item_in;
            break;
          end
      end else begin
        for (int i = 0; i < SLOTS; i++)
          if (slot[i][IW-1 -: ID_W] == item_in[IW-1 -: ID_W]) slot[i] <= '0;
      end
    end
  end

  always_comb begin
    top_item = '0;
    item_count = '0;
    for (int i = 0; i < SLOTS; i++) begin
      if (slot[i][IW-1 -: ID_W] != '0) begin
        item_count++;
        if (top_item[IW-1 -: ID_W] == '0 || slot[i][VAL_W-1:0] > top_item[VAL_W-1:0]) top_item = slot[i];
      end
    end
  end
endmodule
