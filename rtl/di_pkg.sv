// Shared types of the conservative delay-insensitive (CDI) element library.
//
// Every channel in this library is a single wire that carries events by
// transition signalling: an event is one change of the wire level (0->1 or
// 1->0). Elements are clocked emulations of the asynchronous primitives: each
// samples its input wires on the rising clock edge, notices an event as a
// difference between a wire and the level it last consumed, and answers by
// flipping an output register. Because every element only reacts to events and
// never to time, the extra clock of latency per element is just one more
// admissible delay of a delay-insensitive network.
package di_pkg;

  // What one transition of the conservative state machine does with the second
  // event of its doubled output pair (the first always goes on to the next
  // state, except for a push, whose acknowledgement carries the next state).
  typedef enum logic [1:0] {
    ACT_OUT  = 2'd0,  // second event is the single external output event
    ACT_PUSH = 2'd1,  // no output: both events are pushed into the storage stack
    ACT_POP  = 2'd2   // two outputs: second event pops the stack, giving a pair
  } cfsm_act_e;

endpackage
