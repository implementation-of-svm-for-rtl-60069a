a5a5a5
a4a4a4
a7a7a7
a6a6a6
a1a1a1
a0a0a0
a3a3a3
a2a2a2
adadad
acacac
afafaf
aeaeae
a9a9a9
a8a8a8
ababab
aaaaaa
